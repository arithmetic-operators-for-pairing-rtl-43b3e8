01234567
89abcdef
deadbeef
00000042
