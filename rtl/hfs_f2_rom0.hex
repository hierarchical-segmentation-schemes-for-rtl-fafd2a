040
002
003
004
045
047
049
08b
08f
093
0d7
0df
0e7
