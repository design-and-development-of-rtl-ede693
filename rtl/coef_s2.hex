0001
0001
fffd
fffe
0007
0007
fff3
fff1
0015
001d
ffe1
ffcb
0029
0058
ffce
ff74
0036
00d3
ffd0
fece
0019
01af
0019
fdaf
ff8b
0326
0113
fbb5
fdd9
060a
043a
f69f
f67a
14af
37db
37db
14af
f67a
f69f
043a
060a
fdd9
fbb5
0113
0326
ff8b
fdaf
0019
01af
0019
fece
ffd0
00d3
0036
ff74
ffce
0058
0029
ffcb
ffe1
001d
0015
fff1
fff3
0007
0007
fffe
fffd
0001
0001
