2000005
0041011
00c1310
3ffffff
0000000
1234567
