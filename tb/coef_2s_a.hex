0042
0022
0029
002e
0031
0031
002e
0027
001c
000b
fff6
ffdc
ffbe
ff9e
ff7b
ff59
ff38
ff1c
ff05
fef8
fef5
ff00
ff1b
ff47
ff84
ffd5
0039
00af
0136
01cb
026c
0316
03c5
0474
051e
05c1
0655
06d9
0747
079d
07d7
07f5
07f5
07d7
079d
0747
06d9
0655
05c1
051e
0474
03c5
0316
026c
01cb
0136
00af
0039
ffd5
ff84
ff47
ff1b
ff00
fef5
fef8
ff05
ff1c
ff38
ff59
ff7b
ff9e
ffbe
ffdc
fff6
000b
001c
0027
002e
0031
0031
002e
0029
0022
0042
