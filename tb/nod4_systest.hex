02
27
cb
fc
2a
20
93
fd
00
4f
1d
01
91
fc
91
fe
93
c1
09
03
4b
06
45
8b
a5
91
fc
48
1b
9b
01
09
80
4b
24
42
99
01
43
93
c1
81
91
c1
44
