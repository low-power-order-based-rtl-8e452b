0b5
2b5
4b5
6b5
8b5
ab5
cb5
eb5
f05
d2b
b72
9ce
632
48e
2d5
0fb
713
913
59e
b9e
262
c62
0ed
eed
505
f2b
772
3ce
c32
88e
0d5
afb
34b
54b
b4b
d4b
0b5
6b5
8b5
eb5
305
92b
f72
bce
432
08e
6d5
cfb
313
d13
79e
99e
062
e62
4ed
aed
705
b2b
372
fce
032
c8e
4d5
8fb
