0b5
2b5
4b5
6b5
8b5
ab5
cb5
eb5
0fb
2d5
f05
d2b
632
b72
9ce
48e
0ed
eed
262
c62
713
913
59e
b9e
0d5
505
f2b
772
c32
afb
3ce
88e
0b5
6b5
8b5
eb5
34b
54b
b4b
d4b
08e
bce
305
6d5
cfb
432
f72
92b
062
e62
313
d13
79e
99e
4ed
aed
032
372
8fb
4d5
705
b2b
c8e
fce
