ff43
000c
000c
000b
000b
000b
000b
000b
000b
000a
000a
000a
000a
000a
000a
000a
000a
000a
000a
000a
0009
0009
0009
0009
0008
0008
0008
0007
0007
0006
0006
0005
0004
0004
0003
0002
0002
0001
0000
0000
ffff
fffe
fffe
fffd
fffc
fffb
fffb
fffa
fffa
fff9
fff9
fff8
fff8
fff8
fff8
fff8
fff8
fff8
fff8
fff8
fff8
fff9
fff9
fffa
fffa
fffb
fffb
fffc
fffd
fffe
ffff
0000
0000
0001
0002
0003
0004
0005
0006
0007
0008
0009
0009
000a
000b
000b
000b
000c
000c
000c
000c
000c
000c
000c
000c
000b
000b
000a
0009
0008
0007
0006
0005
0004
0003
0002
0001
ffff
fffe
fffd
fffc
fffa
fff9
fff8
fff7
fff6
fff5
fff4
fff3
fff2
fff2
fff1
fff1
fff0
fff0
fff0
fff0
fff1
fff1
fff2
fff2
fff3
fff4
fff5
fff6
fff8
fff9
fffa
fffc
fffd
ffff
0001
0002
0004
0006
0007
0009
000a
000c
000d
000f
0010
0011
0012
0013
0013
0014
0014
0015
0015
0014
0014
0014
0013
0012
0011
0010
000f
000d
000c
000a
0008
0006
0004
0002
0000
fffe
fffc
fffa
fff7
fff5
fff3
fff1
fff0
ffee
ffec
ffeb
ffe9
ffe8
ffe7
ffe7
ffe6
ffe6
ffe6
ffe6
ffe6
ffe7
ffe7
ffe8
ffea
ffeb
ffed
ffee
fff0
fff3
fff5
fff7
fffa
fffc
ffff
0002
0005
0007
000a
000d
000f
0012
0014
0017
0019
001b
001d
001e
001f
0020
0021
0022
0022
0022
0022
0021
0020
001f
001e
001c
001a
0018
0015
0012
000f
000c
0009
0006
0002
ffff
fffb
fff8
fff4
fff1
ffed
ffea
ffe7
ffe4
ffe1
ffde
ffdc
ffda
ffd8
ffd6
ffd5
ffd4
ffd4
ffd4
ffd4
ffd5
ffd6
ffd7
ffd9
ffdb
ffde
ffe0
ffe3
ffe7
ffea
ffee
fff3
fff7
fffb
0000
0004
0009
000e
0012
0017
001b
0020
0024
0027
002b
002e
0031
0034
0036
0038
0039
003a
003a
003a
0039
0038
0037
0035
0032
002f
002b
0028
0023
001e
0019
0014
000e
0009
0003
fffc
fff6
fff0
ffea
ffe4
ffde
ffd8
ffd2
ffcd
ffc8
ffc3
ffbf
ffbb
ffb8
ffb5
ffb3
ffb2
ffb1
ffb1
ffb1
ffb2
ffb4
ffb7
ffba
ffbe
ffc2
ffc7
ffcd
ffd3
ffda
ffe1
ffe9
fff1
fff9
0002
000a
0013
001c
0025
002e
0036
003e
0046
004e
0055
005b
0061
0067
006b
006f
0072
0073
0074
0074
0074
0072
006f
006b
0066
0060
0059
0051
0048
003e
0034
0028
001c
0010
0003
fff5
ffe7
ffd9
ffcb
ffbd
ffaf
ffa1
ff93
ff86
ff7a
ff6e
ff63
ff59
ff50
ff48
ff41
ff3c
ff38
ff36
ff35
ff36
ff39
ff3e
ff44
ff4d
ff57
ff63
ff72
ff82
ff94
ffa8
ffbe
ffd6
fff0
000b
0028
0046
0066
0087
00a9
00cc
00ef
0114
0139
015f
0184
01aa
01d0
01f5
021a
023e
0262
0284
02a5
02c5
02e4
0301
031c
0335
034d
0362
0375
0385
0394
039f
03a8
03af
03b3
03b4
03b3
03af
03a8
039f
0394
0385
0375
0362
034d
0335
031c
0301
02e4
02c5
02a5
0284
0262
023e
021a
01f5
01d0
01aa
0184
015f
0139
0114
00ef
00cc
00a9
0087
0066
0046
0028
000b
fff0
ffd6
ffbe
ffa8
ff94
ff82
ff72
ff63
ff57
ff4d
ff44
ff3e
ff39
ff36
ff35
ff36
ff38
ff3c
ff41
ff48
ff50
ff59
ff63
ff6e
ff7a
ff86
ff93
ffa1
ffaf
ffbd
ffcb
ffd9
ffe7
fff5
0003
0010
001c
0028
0034
003e
0048
0051
0059
0060
0066
006b
006f
0072
0074
0074
0074
0073
0072
006f
006b
0067
0061
005b
0055
004e
0046
003e
0036
002e
0025
001c
0013
000a
0002
fff9
fff1
ffe9
ffe1
ffda
ffd3
ffcd
ffc7
ffc2
ffbe
ffba
ffb7
ffb4
ffb2
ffb1
ffb1
ffb1
ffb2
ffb3
ffb5
ffb8
ffbb
ffbf
ffc3
ffc8
ffcd
ffd2
ffd8
ffde
ffe4
ffea
fff0
fff6
fffc
0003
0009
000e
0014
0019
001e
0023
0028
002b
002f
0032
0035
0037
0038
0039
003a
003a
003a
0039
0038
0036
0034
0031
002e
002b
0027
0024
0020
001b
0017
0012
000e
0009
0004
0000
fffb
fff7
fff3
ffee
ffea
ffe7
ffe3
ffe0
ffde
ffdb
ffd9
ffd7
ffd6
ffd5
ffd4
ffd4
ffd4
ffd4
ffd5
ffd6
ffd8
ffda
ffdc
ffde
ffe1
ffe4
ffe7
ffea
ffed
fff1
fff4
fff8
fffb
ffff
0002
0006
0009
000c
000f
0012
0015
0018
001a
001c
001e
001f
0020
0021
0022
0022
0022
0022
0021
0020
001f
001e
001d
001b
0019
0017
0014
0012
000f
000d
000a
0007
0005
0002
ffff
fffc
fffa
fff7
fff5
fff3
fff0
ffee
ffed
ffeb
ffea
ffe8
ffe7
ffe7
ffe6
ffe6
ffe6
ffe6
ffe6
ffe7
ffe7
ffe8
ffe9
ffeb
ffec
ffee
fff0
fff1
fff3
fff5
fff7
fffa
fffc
fffe
0000
0002
0004
0006
0008
000a
000c
000d
000f
0010
0011
0012
0013
0014
0014
0014
0015
0015
0014
0014
0013
0013
0012
0011
0010
000f
000d
000c
000a
0009
0007
0006
0004
0002
0001
ffff
fffd
fffc
fffa
fff9
fff8
fff6
fff5
fff4
fff3
fff2
fff2
fff1
fff1
fff0
fff0
fff0
fff0
fff1
fff1
fff2
fff2
fff3
fff4
fff5
fff6
fff7
fff8
fff9
fffa
fffc
fffd
fffe
ffff
0001
0002
0003
0004
0005
0006
0007
0008
0009
000a
000b
000b
000c
000c
000c
000c
000c
000c
000c
000c
000b
000b
000b
000a
0009
0009
0008
0007
0006
0005
0004
0003
0002
0001
0000
0000
ffff
fffe
fffd
fffc
fffb
fffb
fffa
fffa
fff9
fff9
fff8
fff8
fff8
fff8
fff8
fff8
fff8
fff8
fff8
fff8
fff9
fff9
fffa
fffa
fffb
fffb
fffc
fffd
fffe
fffe
ffff
0000
0000
0001
0002
0002
0003
0004
0004
0005
0006
0006
0007
0007
0008
0008
0008
0009
0009
0009
0009
000a
000a
000a
000a
000a
000a
000a
000a
000a
000a
000a
000b
000b
000b
000b
000b
000b
000c
000c
ff43
