1000
0b00
0920
0530
0134
0135
