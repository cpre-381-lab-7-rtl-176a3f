8c010000
8c020001
00221820
00412022
00222824
00223025
0022382a
0041402a
ac030004
10220002
8c090002
0121502a
10210001
00215820
ac64ffff
8c0c0004
00220020
8c6dfff7
00017022
1000ffff
