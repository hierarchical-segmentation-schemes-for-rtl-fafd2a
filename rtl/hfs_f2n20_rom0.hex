0100
0002
0003
0004
0105
0107
0109
020b
020f
0313
031b
0323
042b
043b
044b
055b
057b
