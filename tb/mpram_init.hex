1234
b06b
4ea2
ecd9
8b10
2947
c77e
65b5
03ec
a223
405a
de91
7cc8
1aff
b936
576d
f5a4
93db
3212
d049
6e80
0cb7
aaee
4925
e75c
8593
23ca
c201
6038
fe6f
9ca6
3add
