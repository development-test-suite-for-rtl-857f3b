0b
30
55
7a
9f
c4
e9
0e
33
58
7d
a2
c7
ec
11
36
5b
80
a5
ca
ef
14
39
5e
83
a8
cd
f2
17
3c
61
86
ab
d0
f5
1a
3f
64
89
ae
d3
f8
1d
42
67
8c
b1
d6
fb
20
45
6a
8f
b4
d9
fe
23
48
6d
92
b7
dc
01
26
4b
70
95
ba
df
04
29
4e
73
98
bd
e2
07
2c
51
76
9b
c0
e5
0a
2f
54
79
9e
c3
e8
0d
32
57
7c
a1
c6
eb
10
35
5a
7f
a4
c9
ee
13
38
5d
82
a7
cc
f1
16
3b
60
85
aa
cf
f4
19
3e
63
88
ad
d2
f7
1c
41
66
8b
b0
d5
fa
1f
44
69
8e
b3
d8
fd
22
47
6c
91
b6
db
00
25
4a
6f
94
b9
de
03
28
4d
72
97
bc
e1
06
2b
50
75
9a
bf
e4
09
2e
53
78
9d
c2
e7
0c
31
56
7b
a0
c5
ea
0f
34
59
7e
a3
c8
ed
12
37
5c
81
a6
cb
f0
15
3a
5f
84
a9
ce
f3
18
3d
62
87
ac
d1
f6
1b
40
65
8a
af
d4
f9
1e
43
68
8d
b2
d7
fc
21
46
6b
90
b5
da
ff
24
49
6e
93
b8
dd
02
27
4c
71
96
bb
e0
05
2a
4f
74
99
be
e3
08
2d
52
77
9c
c1
e6
