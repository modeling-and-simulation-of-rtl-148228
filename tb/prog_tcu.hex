80010203
98010204
90010205
1800000A
10000007
7FFFFFFF
7FFFFFFF
08000005
28000004
30003006
80010101
20000000
