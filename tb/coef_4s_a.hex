fec3
ffd6
058a
104a
1b73
2040
1b73
104a
058a
ffd6
fec3
