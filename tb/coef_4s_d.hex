0001
0001
ffff
0000
0002
0001
fffe
fffd
0003
0004
fffd
fff9
0002
000a
0000
fff3
fffd
0010
0008
ffed
fff2
0014
0017
ffec
ffde
0010
002e
fff7
ffc5
fffc
0046
0016
ffb1
ffd2
0054
004c
ffaf
ff92
0045
0093
ffd2
ff47
0009
00db
002b
ff09
ff91
0106
00c3
fefd
fedb
00e9
0192
ff50
fdf8
0050
0282
0040
fd04
fef2
036f
0236
fc2a
fc15
042d
06bc
fb92
f34a
0497
2873
3b5b
2873
0497
f34a
fb92
06bc
042d
fc15
fc2a
0236
036f
fef2
fd04
0040
0282
0050
fdf8
ff50
0192
00e9
fedb
fefd
00c3
0106
ff91
ff09
002b
00db
0009
ff47
ffd2
0093
0045
ff92
ffaf
004c
0054
ffd2
ffb1
0016
0046
fffc
ffc5
fff7
002e
0010
ffde
ffec
0017
0014
fff2
ffed
0008
0010
fffd
fff3
0000
000a
0002
fff9
fffd
0004
0003
fffd
fffe
0001
0002
0000
ffff
0001
0001
