0001
0000
fff7
0002
003d
fff7
fef5
001b
0375
ffc6
f5fa
005b
2766
3f97
2766
005b
f5fa
ffc6
0375
001b
fef5
fff7
003d
0002
fff7
0000
0001
