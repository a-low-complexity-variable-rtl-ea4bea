f80000
c00000
e21003
00a100
f000f0
e30007
e13406
e54c10
f80004
fa0005
f84002
f90180
fd0004
e30016
004241
104241
304241
304241
304341
300000
e60001
500000
00a500
fd03ff
f80002
f84002
f90100
f94000
e2f021
e20820
004141
200000
00a5a5
000000
f90177
f00078
e30027
004142
200000
00a5a5
f88002
f8c0f0
e22c35
e40148
f90000
c04141
e32c2f
304141
e22031
e60002
e13832
e40086
0059a5
e503a0
f900f1
000062
b00040
c10000
e2403b
640000
e40081
920000
e2403f
e60001
f900f1
000070
a10000
e10c45
a00000
e13845
e40086
f70001
e08000
