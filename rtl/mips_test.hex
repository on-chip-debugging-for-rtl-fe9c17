20020005
2003000c
2067fff7
00e22025
00642824
00a42820
10a7000a
0064202a
10800001
20050000
00e2202a
00853820
00e23822
ac670044
8c020050
08000011
20020001
00024280
21070100
00073982
20090500
00095022
000a59c3
000b6022
00ec1020
ac020054
