000000
e20c03
000000
000000
e20808
e20c06
000000
000000
000000
e2000a
000000
e1040e
000000
000000
e1080c
e30010
000000
e13411
e2041d
e2041c
e2041b
e2041a
e20419
e20418
000000
000000
000000
000000
000000
000000
e08000
