0000000c
00010000
00010000
00010000
00000000
00000000
00000000
00000000
00020000
00000000
00020000
00020000
00000000
00000000
00000000
00000000
00020000
00020000
00000000
00020000
00000000
00000000
00000000
00000000
00020000
00020000
00000000
00020000
00020000
00020000
00020000
00000000
00000000
00020000
00020000
00020000
00020000
00000000
00020000
00020000
00000000
00000000
00000000
00000000
00000000
00020000
00000000
00020000
00020000
00000000
00000000
00000000
00000000
00020000
00020000
00000000
00020000
00000000
00020000
00000000
00000000
00020000
00020000
00000000
00020000
00020000
00020000
00020000
00000000
00000000
00020000
00020000
00020000
00020000
00000000
00020000
00000000
00000000
00000000
00020000
00000000
00000000
00020000
00000000
00020000
00000000
00000000
00000000
00020000
00000000
00020000
00000000
00000000
00020000
00000000
00020000
00000000
00000000
00020000
00020000
00020000
00020000
00020000
00000000
00020000
00000000
00020000
00020000
00020000
00020000
00020000
00000000
