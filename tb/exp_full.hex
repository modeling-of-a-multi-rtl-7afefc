0000003f
00000acc 00000000 0000000f
000007bc 0000012c 0000000f
000007bc 00000064 0000000f
000007bc 0000012d 0000000f
000007bc 00000063 0000000f
000007bc 0000012c 0000000f
000007bc 00000064 0000000f
000007bc 0000012d 0000000f
000007bc ffffff9c 0000000f
000007bc 00000064 0000000f
000007bc 00000064 0000000f
000007bc 00000064 0000000f
000007bc 0000007b 0000000f
000007bc ffffffd0 0000000f
000007bc 00000086 0000000f
000007bc ffffffe6 0000000f
000007bc 000000a5 0000000f
000007bc ffffff88 0000000f
000007bc 000000c7 0000000f
000007bc ffffffc6 0000000f
000007bc 00004e20 0000000f
000007bc 00000000 0000000f
000007bc 00000000 0000000f
000007bc 00000000 0000000f
000007bc 000001f4 0000000f
000007bc 00000000 0000000f
000007bc 00000190 0000000f
000007bc 00064000 0000000f
000007bc 0000000c 0000000f
000007bc 00000003 0000000f
000007bc 0000012c 0000000f
000007bc 00000002 0000000f
000007bc 00000002 0000000f
000007bc 000000ec 0000000f
000007bc 00000040 0000000f
000007bc 000000ac 0000000f
000007bc 00000024 0000000f
000007bc 0000007f 0000000f
000007bc 00000064 0000000f
000007bc 00000064 0000000f
000007bc 00000000 0000000f
000007bc 00000001 0000000f
000007bc 00000000 0000000f
000007bc 00000001 0000000f
000007bc 00000032 0000000f
000007bc 00000032 0000000f
000007bc 00000032 0000000f
000007bc 00000064 0000000f
000007bc 00000064 0000000f
000007bc ffc00000 0000000f
000007bc ffc00000 0000000f
000007bc ffc00000 0000000f
000007bc ffc00000 0000000f
000007bc 00000000 0000000f
000007bc 00000000 0000000f
000007bc 00000000 0000000f
000007bc 00000000 0000000f
000007bc 00000001 0000000f
000007bc 00000001 0000000f
000007bc 00000001 0000000f
000007bc 42c80000 0000000f
000007bc 00000000 0000000f
000007bc ffc00000 0000000f
00000000
0000003a
000000c8
00000000
ffc00000
ffc00000
ffc00000
00000000
00000000
00000000
00000000
00000001
00000001
00000001
42c80000
00000000
ffc00000
00000032
00000032
00000000
00000064
00000064
00004e20
00000000
00000000
00000000
000001f4
00000000
00000190
00064000
0000000c
00000003
