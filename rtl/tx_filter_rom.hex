3fe
3fe
3fe
3fe
3fe
3fe
3fe
3fe
3fe
3fe
3fe
3ff
001
00a
025
05e
0b5
101
0fb
07c
3bd
329
2f7
2fb
0b5
101
0fb
07d
3c0
335
31d
35b
2f2
2da
2fa
381
040
0cb
0e3
0a5
2f2
2db
2fa
381
043
0d7
109
105
3a9
3de
3f6
3fe
3fe
3f6
3db
3a2
3a9
3de
3f6
3ff
001
002
002
002
057
022
00a
001
3ff
3fe
3fe
3fe
057
022
00a
002
002
00a
025
05e
10e
125
106
07f
3bd
329
2f7
2fb
10e
126
106
07f
3c0
335
31d
35b
34b
2ff
305
383
040
0cb
0e3
0a5
34b
2ff
305
384
043
0d7
109
105
002
002
002
001
3ff
3f6
3db
3a2
002
002
002
002
002
002
002
002
