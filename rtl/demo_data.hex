00000005
00000007
fffffffd
80000000
