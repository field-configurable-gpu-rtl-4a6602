000
100
000
250
101
050
664
000
3d0
2c0
000
700
690
4c0
101
130
359
001
103
1f0
800
8d0
934
400
000
9b6
480
a00
100
000
250
080
1ff
001
101
050
605
000
3d4
2d9
001
720
6cc
4c0
101
130
35a
006
4a0
740
a80
