0113
03ba
0661
0908
0baf
0e56
10fd
13a4
164b
18f2
1b99
1e40
00e7
038e
0635
08dc
0b83
0e2a
10d1
1378
161f
18c6
1b6d
1e14
00bb
0362
0609
08b0
0b57
0dfe
10a5
134c
15f3
189a
1b41
1de8
008f
0336
05dd
0884
0b2b
0dd2
1079
1320
15c7
186e
1b15
1dbc
0063
030a
05b1
0858
0aff
0da6
104d
12f4
159b
1842
1ae9
1d90
0037
02de
0585
082c
