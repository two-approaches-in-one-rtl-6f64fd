@000
0010
0080
@010
0e00
0c00
0c01
0c02
0e0f
0c04
0e10
0c05
1400
001c
0e10
001d
0e00
0cff
0d02
0700
0cf1
0018
@080
0c0a
0df0
0c03
0a01
1805
008f
1401
0089
008d
1419
008d
0e01
00a0
0d03
0c00
0d03
0c01
0cf2
0d0a
1806
@0a0
0b02
0c02
008d
@300
0804
0905
1801
@310
0f3f
0f06
0f5b
0f4f
0f66
0f6d
0f7d
0f07
0f7f
0f6f
0f77
0f7c
0f39
0f5e
0f79
0f71
