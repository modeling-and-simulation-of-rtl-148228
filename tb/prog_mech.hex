80030103
88010201
880C010B
10000000
18000014
98070809
94040506
9C04050A
C000200D
C00D2100
C103000E
D803020F
28000005
3000300F
7FFFFFFF
300C800E
98030C10
08000013
7FFFFFFF
7FFFFFFF
B0030811
20000000
