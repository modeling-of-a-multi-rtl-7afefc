@0
30200ad0
b9f401a4
80000000
b8000000
@6a
3021fff8
fa610004
12610000
20200064
204000c8
00611000
04811000
08a11000
0cc11000
10e11000
15011000
19211000
1d420800
1d611000
15811001
15a11003
21c10017
25e10034
2a010022
2e21004b
32410041
3661ffec
3a810063
3ea1002b
42c11000
42e11001
43011003
43211002
63410005
47611a00
03811800
47a11c00
67c10003
67e10205
f86007bc
f88007bc
f8a007bc
f8c007bc
f8e007bc
f90007bc
f92007bc
f94007bc
f96007bc
f98007bc
f9a007bc
f9c007bc
f9e007bc
fa0007bc
fa2007bc
fa4007bc
fa6007bc
fa8007bc
faa007bc
fac007bc
fae007bc
fb0007bc
fb2007bc
fb4007bc
fb6007bc
fb8007bc
fba007bc
fbc007bc
fbe007bc
48811000
48a11002
80c11000
84e11000
89011000
8d211000
a141007f
a56100ff
a9810000
ada100ff
81c11400
89e11400
8e011400
92210001
92410021
92610041
92810060
92a10061
f86007bc
f88007bc
f8a007bc
f8c007bc
f8e007bc
f90007bc
f92007bc
f94007bc
f96007bc
f98007bc
f9a007bc
f9c007bc
f9e007bc
fa0007bc
fa2007bc
fa4007bc
fa6007bc
fa8007bc
faa007bc
58611000
58811080
58a11100
58c11180
58e11200
59011210
59211220
59411230
59611240
59811250
59a11260
59c10280
59e10300
5a010380
f86007bc
f88007bc
f8a007bc
f8c007bc
f8e007bc
f90007bc
f92007bc
f94007bc
f96007bc
f98007bc
f9a007bc
f9c007bc
f9e007bc
fa0007bc
10600000
10330000
ea610004
30210008
b60f0008
80000000
