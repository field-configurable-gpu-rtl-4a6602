000
420
000
180
250
1b3
440
000
340
001
480
500
340
003
800
888
914
340
001
b3e
a00
5c0
440
000
340
002
800
888
340
001
8b0
924
440
00a
230
4a0
a00
180
250
1a5
600
003
7d0
2c0
002
6aa
4c0
1b3
230
4a0
080
155
000
3d4
720
230
4a0
000
1ff
480
740
abd
800
8d0
946
420
001
9ca
8c8
949
420
002
9ca
b4c
a00
b80
420
003
b80
