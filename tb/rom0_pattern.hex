005
02a
04f
074
099
0be
0e3
108
12d
152
177
19c
1c1
