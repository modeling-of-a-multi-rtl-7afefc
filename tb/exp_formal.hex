0000000c
00000acc 00000000 0000000f
000006b4 00000abc 0000000f
000006b4 00000abc 0000000f
000006b4 00000abc 0000000f
000006b4 00000abb 0000000f
000006b4 00000abc 0000000f
000006b4 00000abc 0000000f
000006b4 00000abb 0000000f
000006b8 00000abc 0000000f
000006b8 00000abc 0000000f
00000abb 00000abc 0000000f
000006b8 00000abd 0000000f
00000000
00000ad0
00000000
00000000
00000000
00000abb
00000abd
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000004
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
