180
108
10c
110
114
118
11c
120
124
128
12c
130
134
138
0bc
0be
0c0
0c2
0c4
046
047
048
049
14a
