ff41
ff0b
febb
feae
ff19
0027
01ec
045e
074a
0a5e
0d32
0f5d
108b
108b
0f5d
0d32
0a5e
074a
045e
01ec
0027
ff19
feae
febb
ff0b
ff41
