e4
1e
e5
b0
f5
57
43
88
ff
27
74
ee
7b
62
92
c2
