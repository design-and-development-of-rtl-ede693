0000
ffff
0000
0001
0000
ffff
ffff
0001
0002
ffff
fffd
0001
0004
ffff
fffa
0000
0007
0002
fff7
fffb
000b
0009
fff4
fff1
000b
0015
fff7
ffe3
0004
0024
0004
ffd5
fff0
0031
001f
ffcd
ffce
0031
0047
ffd8
ffa1
0019
0076
0000
ff76
ffde
009a
004d
ff5f
ff7f
009c
00bd
ff78
ff03
0060
013e
ffde
fe84
ffca
01af
00aa
fe2e
fec4
01db
01f0
fe40
fd34
0171
03da
ff2a
fac9
ffbc
072a
0266
f54e
f838
162a
363b
363b
162a
f838
f54e
0266
072a
ffbc
fac9
ff2a
03da
0171
fd34
fe40
01f0
01db
fec4
fe2e
00aa
01af
ffca
fe84
ffde
013e
0060
ff03
ff78
00bd
009c
ff7f
ff5f
004d
009a
ffde
ff76
0000
0076
0019
ffa1
ffd8
0047
0031
ffce
ffcd
001f
0031
fff0
ffd5
0004
0024
0004
ffe3
fff7
0015
000b
fff1
fff4
0009
000b
fffb
fff7
0002
0007
0000
fffa
ffff
0004
0001
fffd
ffff
0002
0001
ffff
ffff
0000
0001
0000
ffff
0000
