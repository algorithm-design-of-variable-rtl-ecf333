7ff000
7fe032
7fd064
7f9097
7f50c9
7f00fb
7e912c
7e115e
7d818f
7cd1c1
7c21f1
7b5222
7a7252
798282
7872b2
7762e1
76330f
74f33e
73a36b
724398
70d3c5
6f53f1
6dc41c
6c1447
6a6471
68a49b
66c4c3
64e4eb
62e513
60e539
5ed55f
5cb583
5a75a7
5835cb
55f5ed
53960e
51362e
4eb64e
4c366c
49b68a
4716a6
4476c1
41c6dc
3f16f5
3c570d
398724
36b73a
33e74f
30f763
2e1776
2b2787
282798
2527a7
2227b5
1f17c2
1c17cd
18f7d8
15e7e1
12c7e9
0fb7f0
0c97f5
0977f9
0647fd
0327fe
0007ff
fce7fe
f9c7fd
f697f9
f377f5
f057f0
ed47e9
ea27e1
e717d8
e3f7cd
e0f7c2
dde7b5
dae7a7
d7e798
d4e787
d1f776
cf1763
cc274f
c9573a
c68724
c3b70d
c0f6f5
be46dc
bb96c1
b8f6a6
b6568a
b3d66c
b1564e
aed62e
ac760e
aa15ed
a7d5cb
a595a7
a35583
a1355f
9f2539
9d2513
9b24eb
9944c3
97649b
95a471
93f447
92441c
90b3f1
8f33c5
8dc398
8c636b
8b133e
89d30f
88a2e1
8792b2
868282
859252
84b222
83e1f1
8331c1
82818f
81f15e
81712c
8100fb
80b0c9
807097
803064
802032
801000
802fce
803f9c
807f69
80bf37
810f05
817ed4
81fea2
828e71
833e3f
83ee0f
84bdde
859dae
868d7e
879d4e
88ad1f
89dcf1
8b1cc2
8c6c95
8dcc68
8f3c3b
90bc0f
924be4
93fbb9
95ab8f
976b65
994b3d
9b2b15
9d2aed
9f2ac7
a13aa1
a35a7d
a59a59
a7da35
aa1a13
ac79f2
aed9d2
b159b2
b3d994
b65976
b8f95a
bb993f
be4924
c0f90b
c3b8f3
c688dc
c958c6
cc28b1
cf189d
d1f88a
d4e879
d7e868
dae859
dde84b
e0f83e
e3f833
e71828
ea281f
ed4817
f05810
f3780b
f69807
f9c803
fce802
000801
032802
064803
097807
0c980b
0fb810
12c817
15e81f
18f828
1c1833
1f183e
22284b
252859
282868
2b2879
2e188a
30f89d
33e8b1
36b8c6
3988dc
3c58f3
3f190b
41c924
44793f
47195a
49b976
4c3994
4eb9b2
5139d2
5399f2
55fa13
583a35
5a7a59
5cba7d
5edaa1
60eac7
62eaed
64eb15
66cb3d
68ab65
6a6b8f
6c1bb9
6dcbe4
6f5c0f
70dc3b
724c68
73ac95
74fcc2
763cf1
776d1f
787d4e
798d7e
7a7dae
7b5dde
7c2e0f
7cde3f
7d8e71
7e1ea2
7e9ed4
7f0f05
7f5f37
7f9f69
7fdf9c
7fefce
