040
240
440
640
054
5dd
7ac
223
040
640
3c0
5c0
023
454
7dd
3ac
