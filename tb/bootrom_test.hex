00000297
02028293
30529073
1a0002b7
deadbeef
0badf00d
12345678
a5a5a5a5
