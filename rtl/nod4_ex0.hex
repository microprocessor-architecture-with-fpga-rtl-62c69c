02
02
cb
fc
eb
14
4f
0a
48
08
9f
00
09
80
4b
11
42
91
fc
43
37
