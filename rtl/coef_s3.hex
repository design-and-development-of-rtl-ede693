0000
ffff
0002
0001
fffe
fffe
0002
0004
fffe
fffa
0002
0008
0000
fff5
fffd
000f
0007
ffef
fff2
0013
0016
ffee
ffe0
000f
002c
fff8
ffc8
fffc
0043
0016
ffb4
ffd3
0051
004a
ffb2
ff95
0043
0090
ffd4
ff4b
0008
00d7
002c
ff0d
ff91
0102
00c2
ff00
fedd
00e6
0190
ff52
fdfa
004f
0280
0041
fd07
fef1
036c
0236
fc2c
fc15
042b
06bc
fb94
f34a
0495
2873
3b5d
2873
0495
f34a
fb94
06bc
042b
fc15
fc2c
0236
036c
fef1
fd07
0041
0280
004f
fdfa
ff52
0190
00e6
fedd
ff00
00c2
0102
ff91
ff0d
002c
00d7
0008
ff4b
ffd4
0090
0043
ff95
ffb2
004a
0051
ffd3
ffb4
0016
0043
fffc
ffc8
fff8
002c
000f
ffe0
ffee
0016
0013
fff2
ffef
0007
000f
fffd
fff5
0000
0008
0002
fffa
fffe
0004
0002
fffe
fffe
0001
0002
ffff
0000
