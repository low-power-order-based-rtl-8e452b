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
48e
632
9ce
b72
d2b
f05
0ed
262
59e
713
913
b9e
c62
eed
0d5
3ce
505
772
88e
afb
c32
f2b
0b5
34b
54b
6b5
8b5
b4b
d4b
eb5
08e
305
432
6d5
92b
bce
cfb
f72
062
313
4ed
79e
99e
aed
d13
e62
032
372
4d5
705
8fb
b2b
c8e
fce
