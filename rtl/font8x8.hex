00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
f8
00
00
00
00
00
00
00
00
00
60
60
00
00
08
10
20
40
80
00
00
70
88
98
a8
c8
88
70
00
20
60
20
20
20
20
70
00
70
88
08
10
20
40
f8
00
f8
10
20
10
08
88
70
00
10
30
50
90
f8
10
10
00
f8
80
f0
08
08
88
70
00
30
40
80
f0
88
88
70
00
f8
08
10
20
40
40
40
00
70
88
88
70
88
88
70
00
70
88
88
78
08
10
60
00
00
60
60
00
60
60
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
70
88
88
f8
88
88
88
00
f0
88
88
f0
88
88
f0
00
70
88
80
80
80
88
70
00
e0
90
88
88
88
90
e0
00
f8
80
80
f0
80
80
f8
00
f8
80
80
f0
80
80
80
00
70
88
80
b8
88
88
78
00
88
88
88
f8
88
88
88
00
70
20
20
20
20
20
70
00
38
10
10
10
10
90
60
00
88
90
a0
c0
a0
90
88
00
80
80
80
80
80
80
f8
00
88
d8
a8
a8
88
88
88
00
88
88
c8
a8
98
88
88
00
70
88
88
88
88
88
70
00
f0
88
88
f0
80
80
80
00
70
88
88
88
a8
90
68
00
f0
88
88
f0
a0
90
88
00
78
80
80
70
08
08
f0
00
f8
20
20
20
20
20
20
00
88
88
88
88
88
88
70
00
88
88
88
88
88
50
20
00
88
88
88
a8
a8
a8
50
00
88
88
50
20
50
88
88
00
88
88
50
20
20
20
20
00
f8
08
10
20
40
80
f8
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
