0000
ffff
ffff
0004
0002
fff8
fffa
000e
000d
ffe9
ffe7
0021
002d
ffd3
ffb6
0038
0073
ffc0
ff53
0041
00f9
ffc8
fea5
001c
01d9
001b
fd86
ff85
034b
011d
fb97
fdcd
0621
0445
f691
f673
14b5
37dd
37dd
14b5
f673
f691
0445
0621
fdcd
fb97
011d
034b
ff85
fd86
001b
01d9
001c
fea5
ffc8
00f9
0041
ff53
ffc0
0073
0038
ffb6
ffd3
002d
0021
ffe7
ffe9
000d
000e
fffa
fff8
0002
0004
ffff
ffff
0000
