// DES S-boxes S1..S8, each 4 rows of 16 entries, row-major
e 4 d 1 2 f b 8 3 a 6 c 5 9 0 7 0 f 7 4 e 2 d 1 a 6 c b 9 5 3 8 4 1 e 8 d 6 2 b f c 9 7 3 a 5 0 f c 8 2 4 9 1 7 5 b 3 e a 0 6 d
f 1 8 e 6 b 3 4 9 7 2 d c 0 5 a 3 d 4 7 f 2 8 e c 0 1 a 6 9 b 5 0 e 7 b a 4 d 1 5 8 c 6 9 3 2 f d 8 a 1 3 f 4 2 b 6 7 c 0 5 e 9
a 0 9 e 6 3 f 5 1 d c 7 b 4 2 8 d 7 0 9 3 4 6 a 2 8 5 e c b f 1 d 6 4 9 8 f 3 0 b 1 2 c 5 a e 7 1 a d 0 6 9 8 7 4 f e 3 b 5 2 c
7 d e 3 0 6 9 a 1 2 8 5 b c 4 f d 8 b 5 6 f 0 3 4 7 2 c 1 a e 9 a 6 9 0 c b 7 d f 1 3 e 5 2 8 4 3 f 0 6 a 1 d 8 9 4 5 b c 7 2 e
2 c 4 1 7 a b 6 8 5 3 f d 0 e 9 e b 2 c 4 7 d 1 5 0 f a 3 9 8 6 4 2 1 b a d 7 8 f 9 c 5 6 3 0 e b 8 c 7 1 e 2 d 6 f 0 9 a 4 5 3
c 1 a f 9 2 6 8 0 d 3 4 e 7 5 b a f 4 2 7 c 9 5 6 1 d e 0 b 3 8 9 e f 5 2 8 c 3 7 0 4 a 1 d b 6 4 3 2 c 9 5 f a b e 1 7 6 0 8 d
4 b 2 e f 0 8 d 3 c 9 7 5 a 6 1 d 0 b 7 4 9 1 a e 3 5 c 2 f 8 6 1 4 b d c 3 7 e a f 6 8 0 5 9 2 6 b d 8 1 4 a 7 9 5 0 f e 2 3 c
d 2 8 4 6 f b 1 a 9 3 e 5 0 c 7 1 f d 8 a 3 7 4 c 5 6 b 0 e 9 2 7 b 4 1 9 c e 2 0 6 a d f 3 5 8 2 1 e 7 4 a 8 d f c 9 0 3 5 6 b
