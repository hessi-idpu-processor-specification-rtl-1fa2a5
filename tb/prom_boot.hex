3E
01
D3
B0
C3
00
20
76
