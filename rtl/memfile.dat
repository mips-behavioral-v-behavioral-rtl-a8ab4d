80020054
80070050
80e30055
00e22025
00642824
00a42820
10a7000a
0064302a
10c00001
80050000
00e2302a
00c53820
00e23822
20e1fffe
08000011
80070000
80070000
a0270000
08000012
00000000
03000000
05000000
0c000000
