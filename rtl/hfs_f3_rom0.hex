000
001
002
083
085
107
18b
213
223
233
1c3
14b
14f
0d3
0d5
057
058
0d9
0db
0dd
15f
163
167
16b
16f
0f3
0f5
0f7
0f9
07b
07c
07d
