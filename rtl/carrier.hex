00
08
10
18
20
28
30
38
40
48
50
58
60
68
70
78
80
87
8f
97
9f
a7
af
b7
bf
c7
cf
d7
df
e7
ef
f7
ff
f7
ef
e7
df
d7
cf
c7
bf
b7
af
a7
9f
97
8f
87
80
78
70
68
60
58
50
48
40
38
30
28
20
18
10
08
