3c1c1000
279c0000
241d7ff0
0ff00010
00000000
08000000
00000000
1000ffff
