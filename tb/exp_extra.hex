00000011
00002000 12345678 0000000f
00002005 78787878 00000004
0000200a 56785678 00000003
00002010 000000ac 0000000f
00002014 01234567 0000000f
00002018 0000000e 0000000f
0000201c 00000001 0000000f
00002020 00000005 0000000f
00002024 41400000 0000000f
00002028 3faaaaab 0000000f
0000202c 40000000 0000000f
00002030 00000001 0000000f
00002034 00000000 0000000f
00002038 40e00000 0000000f
0000203c 41100000 0000000f
00002040 00000009 0000000f
00002000 12121212 00000008
00000000
00002000
12345678
00000012
00000078
00005678
00000034
000000ac
369d0368
369d0368
01234567
00000007
00000064
0000000e
00000000
00000004
00000001
00000005
00000270
00000009
00000003
40400000
00000004
40800000
41400000
3faaaaab
40000000
00000001
00000000
40e00000
41100000
00000000
