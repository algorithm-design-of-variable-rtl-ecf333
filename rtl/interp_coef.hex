000
000
000
000
000
000
000
000
400
000
000
000
000
000
000
000
000
000
fff
002
ffc
008
ff2
020
3fe
fe2
00e
ff8
004
ffe
001
000
000
001
ffe
005
ff7
010
fe3
042
3f9
fc6
01b
ff1
008
ffc
002
fff
000
001
ffd
007
ff2
018
fd4
066
3f1
fad
027
fea
00c
ffa
003
fff
000
002
ffb
00a
fee
020
fc5
08b
3e5
f96
032
fe4
010
ff8
004
fff
000
002
ffa
00c
fe9
028
fb6
0b2
3d7
f81
03d
fde
013
ff6
004
fff
000
003
ff9
00f
fe4
031
fa7
0da
3c5
f6f
046
fd9
016
ff4
005
fff
000
003
ff8
011
fe0
038
f98
103
3b0
f5f
04e
fd4
019
ff3
006
ffe
fff
003
ff7
014
fdc
040
f8a
12d
398
f51
056
fd0
01b
ff2
006
ffe
fff
004
ff5
016
fd8
047
f7c
158
37d
f46
05c
fcc
01d
ff1
006
ffe
fff
004
ff4
018
fd4
04e
f6f
184
360
f3d
061
fc9
01f
ff0
007
ffe
fff
005
ff3
01a
fd0
054
f62
1b0
341
f37
065
fc7
020
ff0
007
ffe
fff
005
ff2
01c
fcd
05a
f57
1db
31f
f33
068
fc5
021
fef
007
ffe
fff
006
ff1
01e
fca
05f
f4d
207
2fb
f31
06a
fc4
021
fef
007
ffe
fff
006
ff1
01f
fc8
063
f44
232
2d6
f31
06a
fc4
022
fef
007
ffe
fff
006
ff0
020
fc6
066
f3d
25d
2af
f33
06a
fc4
021
fef
007
ffe
fff
007
ff0
021
fc5
068
f37
286
286
f37
068
fc5
021
ff0
007
fff
ffe
007
fef
021
fc4
06a
f33
2af
25d
f3d
066
fc6
020
ff0
006
fff
ffe
007
fef
022
fc4
06a
f31
2d6
232
f44
063
fc8
01f
ff1
006
fff
ffe
007
fef
021
fc4
06a
f31
2fb
207
f4d
05f
fca
01e
ff1
006
fff
ffe
007
fef
021
fc5
068
f33
31f
1db
f57
05a
fcd
01c
ff2
005
fff
ffe
007
ff0
020
fc7
065
f37
341
1b0
f62
054
fd0
01a
ff3
005
fff
ffe
007
ff0
01f
fc9
061
f3d
360
184
f6f
04e
fd4
018
ff4
004
fff
ffe
006
ff1
01d
fcc
05c
f46
37d
158
f7c
047
fd8
016
ff5
004
fff
ffe
006
ff2
01b
fd0
056
f51
398
12d
f8a
040
fdc
014
ff7
003
fff
ffe
006
ff3
019
fd4
04e
f5f
3b0
103
f98
038
fe0
011
ff8
003
000
fff
005
ff4
016
fd9
046
f6f
3c5
0da
fa7
031
fe4
00f
ff9
003
000
fff
004
ff6
013
fde
03d
f81
3d7
0b2
fb6
028
fe9
00c
ffa
002
000
fff
004
ff8
010
fe4
032
f96
3e5
08b
fc5
020
fee
00a
ffb
002
000
fff
003
ffa
00c
fea
027
fad
3f1
066
fd4
018
ff2
007
ffd
001
000
fff
002
ffc
008
ff1
01b
fc6
3f9
042
fe3
010
ff7
005
ffe
001
000
000
001
ffe
004
ff8
00e
fe2
3fe
020
ff2
008
ffc
002
fff
000
000
