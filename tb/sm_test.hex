000
400
000
420
000
5c0
540
101
130
240
800
8d0
924
400
001
9b0
8c8
92a
400
002
9b0
400
003
b62
a00
700
b4e
720
600
003
500
6bc
5a0
0a8
400
063
000
740
acc
800
890
95a
420
00a
9de
420
014
a00
b80
420
005
b80
