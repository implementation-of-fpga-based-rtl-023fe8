80
80
81
81
81
81
82
82
82
82
83
83
83
84
84
84
84
85
85
85
85
86
86
86
86
87
87
87
87
88
88
88
88
89
89
89
89
8a
8a
8a
8b
8b
8b
8b
8c
8c
8c
8c
8d
8d
8d
8d
8e
8e
8e
8e
8f
8f
8f
8f
90
90
90
90
91
91
91
91
92
92
92
93
93
93
93
94
94
94
94
95
95
95
95
96
96
96
96
97
97
97
97
98
98
98
98
99
99
99
99
9a
9a
9a
9a
9b
9b
9b
9b
9c
9c
9c
9c
9d
9d
9d
9d
9e
9e
9e
9e
9f
9f
9f
9f
a0
a0
a0
a0
a1
a1
a1
a1
a2
a2
a2
a2
a3
a3
a3
a3
a4
a4
a4
a4
a5
a5
a5
a5
a6
a6
a6
a6
a7
a7
a7
a7
a8
a8
a8
a8
a9
a9
a9
a9
aa
aa
aa
aa
ab
ab
ab
ab
ac
ac
ac
ac
ad
ad
ad
ad
ae
ae
ae
ae
af
af
af
af
b0
b0
b0
b0
b0
b1
b1
b1
b1
b2
b2
b2
b2
b3
b3
b3
b3
b4
b4
b4
b4
b5
b5
b5
b5
b5
b6
b6
b6
b6
b7
b7
b7
b7
b8
b8
b8
b8
b9
b9
b9
b9
b9
ba
ba
ba
ba
bb
bb
bb
bb
bc
bc
bc
bc
bc
bd
bd
bd
bd
be
be
be
be
be
bf
bf
bf
bf
c0
c0
c0
c0
c1
c1
c1
c1
c1
c2
c2
c2
c2
c3
c3
c3
c3
c3
c4
c4
c4
c4
c4
c5
c5
c5
c5
c6
c6
c6
c6
c6
c7
c7
c7
c7
c8
c8
c8
c8
c8
c9
c9
c9
c9
c9
ca
ca
ca
ca
cb
cb
cb
cb
cb
cc
cc
cc
cc
cc
cd
cd
cd
cd
cd
ce
ce
ce
ce
ce
cf
cf
cf
cf
cf
d0
d0
d0
d0
d0
d1
d1
d1
d1
d1
d2
d2
d2
d2
d2
d3
d3
d3
d3
d3
d4
d4
d4
d4
d4
d5
d5
d5
d5
d5
d6
d6
d6
d6
d6
d7
d7
d7
d7
d7
d7
d8
d8
d8
d8
d8
d9
d9
d9
d9
d9
da
da
da
da
da
da
db
db
db
db
db
dc
dc
dc
dc
dc
dc
dd
dd
dd
dd
dd
dd
de
de
de
de
de
df
df
df
df
df
df
e0
e0
e0
e0
e0
e0
e1
e1
e1
e1
e1
e1
e2
e2
e2
e2
e2
e2
e3
e3
e3
e3
e3
e3
e4
e4
e4
e4
e4
e4
e5
e5
e5
e5
e5
e5
e5
e6
e6
e6
e6
e6
e6
e7
e7
e7
e7
e7
e7
e7
e8
e8
e8
e8
e8
e8
e9
e9
e9
e9
e9
e9
e9
ea
ea
ea
ea
ea
ea
ea
eb
eb
eb
eb
eb
eb
eb
ec
ec
ec
ec
ec
ec
ec
ec
ed
ed
ed
ed
ed
ed
ed
ee
ee
ee
ee
ee
ee
ee
ee
ef
ef
ef
ef
ef
ef
ef
ef
f0
f0
f0
f0
f0
f0
f0
f0
f1
f1
f1
f1
f1
f1
f1
f1
f1
f2
f2
f2
f2
f2
f2
f2
f2
f3
f3
f3
f3
f3
f3
f3
f3
f3
f4
f4
f4
f4
f4
f4
f4
f4
f4
f4
f5
f5
f5
f5
f5
f5
f5
f5
f5
f5
f6
f6
f6
f6
f6
f6
f6
f6
f6
f6
f7
f7
f7
f7
f7
f7
f7
f7
f7
f7
f7
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
f9
f9
f9
f9
f9
f9
f9
f9
f9
f9
f9
f9
f9
fa
fa
fa
fa
fa
fa
fa
fa
fa
fa
fa
fa
fa
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fc
fc
fc
fc
fc
fc
fc
fc
fc
fc
fc
fc
fc
fc
fc
fc
fc
fc
fd
fd
fd
fd
fd
fd
fd
fd
fd
fd
fd
fd
fd
fd
fd
fd
fd
fd
fd
fd
fd
fd
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
fe
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
ff
