9e3779b9
3c6ef373
daa66d29
78dde6e7
17156099
b54cda53
53845409
f1bbcdcf
8ff34789
2e2ac133
cc623af9
6a99b4a7
08d12e69
a708a813
454021d9
e3779b9f
81af1559
1fe68f13
be1e08a9
5c558267
fa8cfc39
98c475f3
36fbef89
d533694f
736ae309
11a25cd3
afd9d699
4e115027
ec48c9e9
8a8043b3
28b7bd79
c6ef373f
6526b0f9
035e2ab3
a195a469
3fcd1e27
de049799
7c3c1153
1a738b09
b8ab04cf
56e27e89
f519f873
93517239
3188ebe7
cfc065a9
6df7df13
0c2f58d9
aa66d29f
489e4c59
e6d5c613
850d3fe9
2344b9a7
c17c3379
5fb3ad33
fdeb2689
9c22a04f
3a5a1a09
d89193d3
76c90d99
15008767
b3380129
516f7af3
efa6f4b9
8dde6e7f
