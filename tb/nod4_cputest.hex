02
99
cb
f0
8b
05
88
03
91
c0
8a
0a
91
c1
20
61
f1
c2
eb
c8
8b
11
9d
01
8b
00
9f
01
9c
01
91
c3
08
0f
0a
50
91
c4
81
81
80
91
c5
41
91
c6
42
91
c7
40
49
36
48
8a
09
01
4b
3c
48
8a
4a
40
48
8a
4d
44
48
8a
8b
80
09
10
4e
4c
48
8a
4c
50
48
8a
4b
8a
49
8a
4d
8a
eb
30
ea
10
69
20
4a
8a
f0
c0
f1
d1
c0
c0
eb
00
f9
00
c1
c1
4f
90
eb
00
8b
00
2a
20
e1
60
01
91
cd
93
cc
09
05
4a
72
f1
ce
28
df
45
8b
77
91
cf
d1
d0
48
88
8b
ee
91
df
48
8a
9b
00
91
ca
8b
5a
99
01
43
20
01
91
cb
93
cc
88
01
91
cc
44
