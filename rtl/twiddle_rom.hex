7fff0000
7ffeff37
7ffdfe6e
7ff9fda5
7ff5fcdc
7ff0fc13
7fe9fb4a
7fe1fa81
7fd8f9b8
7fcdf8ef
7fc1f827
7fb4f75e
7fa6f696
7f97f5cd
7f86f505
7f74f43c
7f61f374
7f4df2ac
7f37f1e4
7f21f11d
7f09f055
7eefef8e
7ed5eec6
7eb9edff
7e9ced38
7e7eec71
7e5febab
7e3eeae4
7e1dea1e
7dfae958
7dd5e892
7db0e7cd
7d89e707
7d62e642
7d39e57e
7d0ee4b9
7ce3e3f5
7cb6e331
7c88e26d
7c59e1a9
7c29e0e6
7bf8e023
7bc5df61
7b91de9f
7b5cdddd
7b26dd1b
7aeedc5a
7ab6db99
7a7cdad8
7a41da18
7a05d958
79c8d899
7989d7da
794ad71b
7909d65d
78c7d59f
7884d4e1
783fd424
77fad367
77b3d2ab
776bd1ef
7722d134
76d8d079
768dcfbf
7641cf05
75f3ce4b
75a5cd92
7555ccda
7504cc21
74b2cb6a
745fcab3
740ac9fc
73b5c946
735ec891
7307c7dc
72aec727
7254c674
71f9c5c0
719dc50e
7140c45b
70e2c3aa
7083c2f9
7022c248
6fc1c198
6f5ec0e9
6efbc03b
6e96bf8d
6e30bedf
6dc9be32
6d61bd86
6cf8bcdb
6c8ebc30
6c23bb86
6bb7badc
6b4aba33
6adcb98b
6a6db8e4
69fdb83d
698bb797
6919b6f1
68a6b64c
6832b5a8
67bcb505
6746b463
66cfb3c1
6656b320
65ddb27f
6563b1e0
64e8b141
646cb0a3
63eeb005
6370af69
62f1aecd
6271ae32
61f0ad98
616eacfe
60ebac65
6068abce
5fe3ab37
5f5daaa0
5ed7aa0b
5e4fa976
5dc7a8e3
5d3ea850
5cb3a7be
5c28a72d
5b9ca69c
5b0fa60d
5a82a57e
59f3a4f1
5964a464
58d3a3d8
5842a34d
57b0a2c2
571da239
568aa1b1
55f5a129
5560a0a3
54c9a01d
54329f98
539b9f15
53029e92
52689e10
51ce9d8f
51339d0f
50979c90
4ffb9c12
4f5d9b94
4ebf9b18
4e209a9d
4d819a23
4ce099aa
4c3f9931
4b9d98ba
4afb9844
4a5897ce
49b4975a
490f96e7
48699675
47c39603
471c9593
46759524
45cd94b6
45249449
447a93dd
43d09372
43259308
427a929f
41ce9237
412191d0
4073916a
3fc59105
3f1790a2
3e68903f
3db88fde
3d078f7d
3c568f1e
3ba58ec0
3af28e63
3a408e07
398c8dac
38d98d52
38248cf9
376f8ca2
36ba8c4b
36048bf6
354d8ba1
34968b4e
33df8afc
33268aab
326e8a5b
31b58a0d
30fb89bf
30418973
2f878928
2ecc88de
2e118895
2d55884d
2c998806
2bdc87c1
2b1f877c
2a618739
29a386f7
28e586b6
28268677
27678638
26a885fb
25e885bf
25288584
2467854a
23a68512
22e584da
222384a4
2161846f
209f843b
1fdd8408
1f1a83d7
1e5783a7
1d938378
1ccf834a
1c0b831d
1b4782f2
1a8282c7
19be829e
18f98277
18338250
176e822b
16a88206
15e281e3
151c81c2
145581a1
138f8182
12c88164
12018147
113a812b
10728111
0fab80f7
0ee380df
0e1c80c9
0d5480b3
0c8c809f
0bc4808c
0afb807a
0a338069
096a805a
08a2804c
07d9803f
07118033
06488028
057f801f
04b68017
03ed8010
0324800b
025b8007
01928003
00c98002
00008001
ff378002
fe6e8003
fda58007
fcdc800b
fc138010
fb4a8017
fa81801f
f9b88028
f8ef8033
f827803f
f75e804c
f696805a
f5cd8069
f505807a
f43c808c
f374809f
f2ac80b3
f1e480c9
f11d80df
f05580f7
ef8e8111
eec6812b
edff8147
ed388164
ec718182
ebab81a1
eae481c2
ea1e81e3
e9588206
e892822b
e7cd8250
e7078277
e642829e
e57e82c7
e4b982f2
e3f5831d
e331834a
e26d8378
e1a983a7
e0e683d7
e0238408
df61843b
de9f846f
dddd84a4
dd1b84da
dc5a8512
db99854a
dad88584
da1885bf
d95885fb
d8998638
d7da8677
d71b86b6
d65d86f7
d59f8739
d4e1877c
d42487c1
d3678806
d2ab884d
d1ef8895
d13488de
d0798928
cfbf8973
cf0589bf
ce4b8a0d
cd928a5b
ccda8aab
cc218afc
cb6a8b4e
cab38ba1
c9fc8bf6
c9468c4b
c8918ca2
c7dc8cf9
c7278d52
c6748dac
c5c08e07
c50e8e63
c45b8ec0
c3aa8f1e
c2f98f7d
c2488fde
c198903f
c0e990a2
c03b9105
bf8d916a
bedf91d0
be329237
bd86929f
bcdb9308
bc309372
bb8693dd
badc9449
ba3394b6
b98b9524
b8e49593
b83d9603
b7979675
b6f196e7
b64c975a
b5a897ce
b5059844
b46398ba
b3c19931
b32099aa
b27f9a23
b1e09a9d
b1419b18
b0a39b94
b0059c12
af699c90
aecd9d0f
ae329d8f
ad989e10
acfe9e92
ac659f15
abce9f98
ab37a01d
aaa0a0a3
aa0ba129
a976a1b1
a8e3a239
a850a2c2
a7bea34d
a72da3d8
a69ca464
a60da4f1
a57ea57e
a4f1a60d
a464a69c
a3d8a72d
a34da7be
a2c2a850
a239a8e3
a1b1a976
a129aa0b
a0a3aaa0
a01dab37
9f98abce
9f15ac65
9e92acfe
9e10ad98
9d8fae32
9d0faecd
9c90af69
9c12b005
9b94b0a3
9b18b141
9a9db1e0
9a23b27f
99aab320
9931b3c1
98bab463
9844b505
97ceb5a8
975ab64c
96e7b6f1
9675b797
9603b83d
9593b8e4
9524b98b
94b6ba33
9449badc
93ddbb86
9372bc30
9308bcdb
929fbd86
9237be32
91d0bedf
916abf8d
9105c03b
90a2c0e9
903fc198
8fdec248
8f7dc2f9
8f1ec3aa
8ec0c45b
8e63c50e
8e07c5c0
8dacc674
8d52c727
8cf9c7dc
8ca2c891
8c4bc946
8bf6c9fc
8ba1cab3
8b4ecb6a
8afccc21
8aabccda
8a5bcd92
8a0dce4b
89bfcf05
8973cfbf
8928d079
88ded134
8895d1ef
884dd2ab
8806d367
87c1d424
877cd4e1
8739d59f
86f7d65d
86b6d71b
8677d7da
8638d899
85fbd958
85bfda18
8584dad8
854adb99
8512dc5a
84dadd1b
84a4dddd
846fde9f
843bdf61
8408e023
83d7e0e6
83a7e1a9
8378e26d
834ae331
831de3f5
82f2e4b9
82c7e57e
829ee642
8277e707
8250e7cd
822be892
8206e958
81e3ea1e
81c2eae4
81a1ebab
8182ec71
8164ed38
8147edff
812beec6
8111ef8e
80f7f055
80dff11d
80c9f1e4
80b3f2ac
809ff374
808cf43c
807af505
8069f5cd
805af696
804cf75e
803ff827
8033f8ef
8028f9b8
801ffa81
8017fb4a
8010fc13
800bfcdc
8007fda5
8003fe6e
8002ff37
