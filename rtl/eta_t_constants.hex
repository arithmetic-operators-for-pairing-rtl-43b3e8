@4
00000000000000000000000000000000000000000000000001
@40
150aa540000000000000000000000000000000000000000000
02000000000000000000000000000000000000000000000000
01000000000000000000000000000000000000000000000000
05040000000000000000000000000000000000000000000000
06000000000000000000000000000000000000000000000000
09080000000000000000000000000000000000000000000000
00000000000000000000000000000000000000000000000000
15000000000000000000000000000000000000000000000000
0a080000000000000000000000000000000000000000000000
09000000000000000000000000000000000000000000000000
05000000000000000000000000000000000000000000000000
0a000000000000000000000000000000000000000000000000
0a280000000000000000000000000000000000000000000000
05282000000000000000000000000000000000000000000000
09149280000000000000000000000000000000000000000000
0928624a000000000000000000000000000000000000000000
0a282000000000000000000000000000000000000000000000
0624a000000000000000000000000000000000000000000000
