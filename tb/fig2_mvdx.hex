0 0 0 0 0 0 0 0 0 0 0 0 0 2 1 1 0 0 3 3 0 1 0
0 0 0 0 0 0 0 0 0 0 0 0 0 0 5 0 0 0 1 0 0 0 0
0 0 0 0 0 0 0 0 0 0 0 0 0 0 0 1 0 0 1 1 0 2 0
0 2 0 0 0 0 0 0 0 0 0 0 0 0 0 0 1 0 1 0 1 0 0
0 0 0 0 0 0 2 3 6 0 0 0 0 0 0 0 6 0 1 6 1 1 0
0 0 0 0 0 0 2 3 e c d b 5 6 3 3 7 0 0 0 0 0 0
0 0 0 0 0 0 4 2 0 0 0 1 5 0 2 0 0 0 0 0 0 0 0
0 0 0 0 0 0 1 1 0 0 0 3 3 0 0 2 2 2 2 0 0 0 0
0 0 0 0 0 0 0 0 0 0 2 2 0 0 0 0 1 0 2 2 0 0 0
0 3 1 0 0 0 3 9 0 0 4 0 1 0 1 0 2 0 0 0 0 0 0
0 1 1 0 1 1 0 1 2 0 a 0 1 1 0 1 1 0 0 0 2 0 0
0 0 0 1 0 1 1 0 6 0 2 0 0 1 3 0 0 1 0 0 0 0 0
0 0 0 0 0 0 0 0 0 7 2 1 1 0 0 1 0 0 0 0 0 0 0
0 0 3 0 0 0 0 2 5 f 0 1 4 3 1 0 0 0 0 0 0 0 0
0 0 0 0 0 0 0 0 0 1 0 1 2 3 2 0 0 0 0 0 0 0 0
0 0 0 0 1 0 1 f 5 0 0 0 0 2 3 0 0 0 0 0 0 0 0
0 0 0 0 0 0 0 0 1 7 d 0 3 8 0 0 0 0 0 0 0 0 0
0 0 0 0 0 0 0 0 1 2 3 0 2 0 0 0 0 0 0 0 0 0 0
