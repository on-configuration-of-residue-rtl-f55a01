e0f
e0f
e0f
e0e
e0e
e0d
e0d
e0c
e0b
e0a
e08
e07
e05
e04
e02
e00
dfe
dfb
df9
df7
df4
df1
dee
deb
de8
de5
de1
dde
dda
dd6
dd2
dce
dca
dc5
dc1
dbc
db8
db3
dae
da8
da3
d9e
d98
d92
d8d
d87
d81
d7a
d74
d6e
d67
d60
d59
d52
d4b
d44
d3d
d35
d2d
d26
d1e
d16
d0e
d05
cfd
cf5
cec
ce3
cda
cd1
cc8
cbf
cb5
cac
ca2
c99
c8f
c85
c7b
c70
c66
c5c
c51
c46
c3b
c30
c25
c1a
c0f
c04
bf8
bec
be1
bd5
bc9
bbd
bb0
ba4
b98
b8b
b7e
b72
b65
b58
b4b
b3e
b30
b23
b15
b08
afa
aec
ade
ad0
ac2
ab4
aa5
a97
a88
a79
a6b
a5c
a4d
a3e
a2f
a1f
a10
a00
9f1
9e1
9d1
9c2
9b2
9a2
991
981
971
961
950
93f
92f
91e
90d
8fc
8eb
8da
8c9
8b8
8a6
895
883
872
860
84e
83c
82a
818
806
7f4
7e2
7cf
7bd
7ab
798
785
773
760
74d
73a
727
714
701
6ee
6db
6c7
6b4
6a1
68d
679
666
652
63e
62b
617
603
5ef
5db
5c7
5b2
59e
58a
576
561
54d
538
524
50f
4fb
4e6
4d1
4bc
4a8
493
47e
469
454
43f
42a
415
400
3ea
3d5
3c0
3ab
395
380
36a
355
340
32a
315
2ff
2e9
2d4
2be
2a8
293
27d
267
252
23c
226
210
1fa
1e4
1ce
1b9
1a3
18d
177
161
14b
135
11f
109
0f3
0dd
0c7
0b1
09b
084
06e
058
042
02c
016
000
