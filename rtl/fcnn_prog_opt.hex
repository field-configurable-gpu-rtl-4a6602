0000
1800
2500
1a50
6640
7d00
2c00
68a0
4c00
1b30
3591
1ff0
8000
8d00
9240
4000
0000
9a60
4800
a000
1800
2500
0801
01ff
1a50
6050
7d50
2d91
6b40
4c00
1b30
35a6
4a00
7400
a800
