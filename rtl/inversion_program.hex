0000000f
01000020
0000004a
00000000
02a00000
0000000f
00a00020
000001d0
7c0007d0
00000000
02240000
0024480f
01000020
0400004a
00000000
02a40000
0024480f
00a40020
000001d0
7c0007d0
00000000
02280000
0028500f
01000020
0c00004a
00000000
02a80000
0028500f
00a80020
000001d0
7c0007d0
00000000
022c0000
002c580f
01000020
1c00004a
00000000
02ac0000
002c580f
00ac0020
000001d0
7c0007d0
00000000
02300000
0030600f
01000020
3c00004a
00000000
02b00000
0030600f
00b00020
000001d0
7c0007d0
00000000
02340000
0034680f
01000020
7c00004a
00000000
02b40000
0034680f
00b40020
000001d0
7c0007d0
00000000
02380000
0038700f
01000020
7c00004a
00000000
02b80000
0034680f
00b80020
000001d0
7c0007d0
00000000
023c0000
003c780f
003c0020
000001d0
7c0007d0
00000000
02400000
0040800f
01000020
0000004a
00000000
02440000
0044880f
00000020
000001d0
7c0007d0
00000000
02400000
ffffffff
