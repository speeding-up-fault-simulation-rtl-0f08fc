1e
0a
15
01
