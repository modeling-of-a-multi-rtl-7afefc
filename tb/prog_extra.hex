@0
30200ad0
b9f401a4
80000000
b8000000
@6a
30202000
b0001234
30405678
f8410000
f0410005
f441000a
e8610000
e0810005
e4a1000a
e0c10001
00e62000
f8e10010
61020003
11280000
65420004
f9410014
21600007
21800064
49ab6000
f9a10018
21c00000
be0e000c
22000001
22100064
fa01001c
bc2e0008
22200005
fa210020
22800003
5ab40280
22c00004
5af60280
5b15b900
5b35b980
5b570380
5b790300
5b95ba10
5bb5b800
5bd5c080
fb010024
fb210028
fb41002c
fb610030
fb810034
fba10038
fbc1003c
32400270
98189000
22600009
2260004d
fa610040
c0610000
d0617000
b60f0008
80000000
