0000000f
01000020
0000004a
0000005a
00002003
000004d0
0004080f
02000000
0000005a
0000005a
00000000
02040000
bc0007ff
01040020
0004080f
000000d0
00000000
02040000
01080020
0010200f
000000d0
00000000
02140000
010c0020
0008000f
000000d0
0014280f
000004d0
00000000
02200000
0020400f
00200020
000001d0
7c0007d0
00000000
02280000
0020400f
000c0020
000001d0
7c0007d0
00000000
022c0000
0020400f
00040020
000001d0
7c0007d0
00000000
02300000
0030600f
00280020
000001d0
7c0007d0
00000000
02340000
000c180f
00040020
000001d0
7c0007d0
00000000
02380000
000c180f
00380020
000001d0
7c0007d0
00000000
023c0000
0004080f
00380020
000001d0
7c0007d0
00000000
02400000
01100020
000c600f
000000d0
00000000
02440000
01100020
0038500f
000000d0
00000000
02480000
0048900f
00440020
000001d0
7c0007d0
00000000
024c0000
01140020
0034980f
000000d0
003c780f
000004d0
00000000
02640000
01140020
003c680f
000000d0
0004080f
000004d0
00000000
02600000
01100020
0040580f
000000d0
00000000
026c0000
01040020
0004080f
000000d0
00000000
02680000
01180020
0010200f
000000d0
00000000
02700000
01040020
000c180f
000000d0
00000000
02740000
0060c00f
011c0020
0000004a
00000000
03900000
0064c80f
011c0020
0000004a
00000000
03940000
0068d00f
011c0020
0000004a
00000000
03980000
006cd80f
011c0020
0000004a
00000000
039c0000
0070e00f
011c0020
0000004a
00000000
03a00000
0074e80f
011c0020
0000004a
00000000
03a40000
010c0020
019b200f
000000d0
01a3400f
000004d0
00000000
02400000
01200020
019f280f
000000d0
01a7480f
000004d0
00000000
02440000
01240020
01a3300f
000000d0
00000000
02480000
01100020
01a7380f
000000d0
00000000
024c0000
01080020
01a3400f
000000d0
00000000
02500000
01040020
01a7480f
000000d0
00000000
02540000
01040020
0004080f
000000d0
00000000
02040000
0008100f
011c0020
0400004a
00000000
02080000
000c180f
011c0020
0400004a
00000000
020c0000
01240020
0010280f
000000d0
00000000
02140000
010c0020
0008000f
000000d0
0014280f
000004d0
00000000
02200000
0020400f
00200020
000001d0
7c0007d0
00000000
02a00000
000c180f
00040020
000001d0
7c0007d0
00000000
02a40000
01280020
0044800f
000000d0
00000000
02dc0000
01240020
00a1480f
000000d0
00000000
02e00000
01280020
0054a00f
000000d0
00000000
02e40000
01280020
0048800f
000000d0
00000000
02e80000
01280020
004c880f
000000d0
00000000
02ec0000
012c0020
0021400f
000000d0
00000000
02f00000
01280020
00edd00f
000000d0
00000000
02f40000
01280020
00a5e00f
000000d0
00000000
02f80000
00a1400f
00400020
000001d0
7c0007d0
00000000
02a80000
00a5480f
00440020
000001d0
7c0007d0
00000000
02ac0000
00e1c00f
00dc0020
000001d0
7c0007d0
00000000
02b00000
0048900f
00200020
000001d0
7c0007d0
00000000
02b40000
004c980f
00200020
000001d0
7c0007d0
00000000
02b80000
00a1400f
00500020
000001d0
7c0007d0
00000000
02bc0000
00a5480f
00540020
000001d0
7c0007d0
00000000
02c00000
00e1c00f
00e40020
000001d0
7c0007d0
00000000
02c40000
0050a00f
00200020
000001d0
7c0007d0
00000000
02c80000
0054a80f
00200020
000001d0
7c0007d0
00000000
02cc0000
00f1e00f
00e80020
000001d0
7c0007d0
00000000
02d00000
00a5480f
00ec0020
000001d0
7c0007d0
00000000
02d40000
00f9f00f
00f40020
000001d0
7c0007d0
00000000
02d80000
01300020
00ad500f
000000d0
0049900f
000004d0
00000000
02780000
01340020
00a9600f
000000d0
00cd580f
000004d0
004c980f
000004d0
00000000
027c0000
01380020
00d5a00f
000000d0
00ad500f
000004d0
00c9680f
000004d0
0050900f
000004d0
00000000
02800000
013c0020
00d1b00f
000000d0
00b1a80f
000004d0
00ad500f
000004d0
00cd700f
000004d0
0054980f
000004d0
00000000
02840000
01400020
00bd680f
000000d0
0041800f
000004d0
0050a00f
000004d0
00000000
02880000
01440020
00c5700f
000000d0
00c1780f
000004d0
0054880f
000004d0
00000000
028c0000
0078f00f
011c0020
0000004a
00000000
03900000
007cf80f
011c0020
0000004a
00000000
03940000
0081000f
011c0020
0000004a
00000000
03980000
0085080f
011c0020
0000004a
00000000
039c0000
0089100f
011c0020
0000004a
00000000
03a00000
008d180f
011c0020
0000004a
00000000
03a40000
010c0020
019b200f
000000d0
01a3400f
000004d0
00000000
02400000
01200020
019f280f
000000d0
01a7480f
000004d0
00000000
02440000
01240020
01a3300f
000000d0
00000000
02480000
01100020
01a7380f
000000d0
00000000
024c0000
01080020
01a3400f
000000d0
00000000
02500000
01040020
01a7480f
000000d0
00000000
02540000
bc05d7ff
ffffffff
