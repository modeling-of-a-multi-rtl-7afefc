@0
30200ad0
b9f401a4
80000000
b8000000
@6a
3021fff8
fa610004
12610000
20a00abc
b8000014
20a50001
20a50002
80000000
80000000
f8a006b4
80000000
80000000
80000000
20a00abb
b8100014
20a50001
20a50002
20a50003
80000000
f8a006b4
80000000
80000000
80000000
20a00abc
b800000c
20a50001
20a50002
f8a006b4
80000000
80000000
80000000
20a00abb
b800000c
20a50001
20a50002
f8a006b4
80000000
80000000
80000000
20a00abb
20a50001
f8a006b4
80000000
80000000
80000000
20a00abb
80000000
20a50001
80000000
80000000
f8a006b4
20a00abb
f8a006b4
20a00000
e8a006b4
20a50001
f8a006b8
80000000
80000000
80000000
e8a006b4
80000000
20a50001
f8a006b8
e8a006b4
20c00abc
f8c50000
20c00000
20a00000
e8a006b4
e8c50000
20c60001
f8c006b8
10600000
10330000
ea610004
30210008
b60f0008
80000000
