0a3d
0a43
0a52
0a6c
0a91
0abf
0af9
0b3c
0b8a
0be1
0c43
0caf
0d25
0da5
0e2f
0ec2
0f5f
1006
10b6
116f
1231
12fd
13d1
14ae
1594
1681
1778
1876
197c
1a8a
1b9f
1cbc
1de0
1f0b
203c
2175
22b3
23f8
2542
2692
27e7
2942
2aa1
2c06
2d6e
2edb
304c
31c0
3338
34b3
3631
37b2
3935
3aba
3c41
3dc9
3f53
40de
4269
43f6
4582
470e
489a
4a25
4baf
4d39
4ec0
5046
51ca
534c
54cb
5648
57c2
5938
5aaa
5c19
5d84
5eea
604c
61a9
6301
6454
65a1
66e9
682a
6966
6a9b
6bc9
6cf0
6e11
6f2a
703b
7145
7248
7342
7434
751e
75ff
76d8
77a7
786e
792c
79e1
7a8c
7b2e
7bc6
7c55
7cd9
7d54
7dc5
7e2c
7e89
7edc
7f24
7f63
7f97
7fc0
7fdf
7ff4
7fff
0000
0000
0000
0000
0000
0000
0000
0000
3c8b
86ea
3c8b
78e6
c6ba
