000000000
ffff0fa91
ff0000000
00ff00000
010100001
808004000
aa55038c2
55aa039d2
0ff000e80
f00f007e0
a54d02eb1
ca1801040
253000940
bb1d01087
6d13008ff
2cde02848
d62301f4a
7b2e011b2
d91e013c6
3f720207e
1fcb018ad
197100c59
174400604
94d607a28
493c00d54
9d5c03834
346001700
be310266e
201e00440
69fe06666
daa008880
eee80d580
b99906d41
7f5c02c74
7c290116c
99fd09765
afe509a2b
932501727
3cd603448
54af03a6c
4dfa04a62
d71400f64
27a001820
aeb3079aa
fee90e7de
232f004f5
8af2081c4
211f00477
9ee408f80
91c506d05
b10b004f3
ecb50a4cc
563b014ba
fc1e01728
6f9303fdd
427e01e44
cbc809e90
fe29025de
55e504ea1
cd8e06e16
46dc03940
8ed407640
b7c2089ce
764d01e66
2a5a01094
4d76024ce
7706001ea
f85d05608
869004a40
024a00004
d6bd09a86
a34002800
1be901943
c8cb09fc8
ccc90a2cc
35f60362e
cd1f013fb
612200ce2
6ae105cca
533801310
ae1a0119c
340000000
4d3300e1f
ba0d00402
246a00f48
c04c03700
81b105941
baf20b224
3e3b00e3a
f9ee0e3b6
f5f70edab
9f2b01acd
493400d44
af8705851
f55204eea
0b69004b3
b94b03443
0d98006b0
2e8501606
bb5503ee7
b6720542c
a87204d40
637a02dd6
cd7405c44
66fc061c0
b60e00464
0e8f0060a
f18407984
63b004580
e4b20a0c8
ba2901c9a
703401900
74f007100
64ac04000
68f7065c8
00f500000
b02b01ce0
3dc60308e
66f4062c0
5bde04b02
aa2c01880
caed0b802
cd2b01eff
5157019b7
410e00196
4dee04736
4af204544
b34f03035
430a00096
073400204
47de03a72
636c025b4
0e8000600
6c9503f4c
7ba604ea2
84d606d08
431f00635
b5ea0a612
d7420378e
4d0900055
e15d04ff5
024c00000
584801a00
f23d036c2
1fa60142a
f736035ea
1d7f00f8b
618d031d5
15320054a
e70e007d2
20e201c40
a666040c4
8de707f2b
f47e07668
84670348c
e54603bce
d53e030f6
c8e20b180
a125014a5
7bdb06769
256c00f34
9b3e02422
4fbb0356d
4981024c9
46ef03f4a
703001800
cbf90c213
5372025a6
52dc04240
cead08706
d764056a4
b6a30756a
2fbb0210d
09ad004b5
eae10cd4a
09c400884
a9970627f
203900800
753501aa1
2b87014cd
8b1400864
5c8a02e28
42d803440
84cf0698c
4cfd04a4c
a72d019d3
8e1d00cc6
5dd904f05
2589012b5
082d00008
852a01632
7122010e2
873e01f12
e805001c8
add509129
894202502
167a00bec
385201440
861900cc6
5c670289c
9f9c05cf4
699403da4
e45b04eec
8ab105d4a
098000480
120700006
096100429
f37d07327
e43602ec8
ddfd0d959
c99d07835
6e7503526
af65043ab
47cf03659
b11b01123
4207001c6
248201248
dc53047dc
1c2b0053c
c39006ce0
7c96047c8
17eb0164d
5e5001e40
89e4078a4
018600086
baa807880
a57d04ff1
119e008b6
6fb604e4a
5d0000000
abc308251
2af30292e
8e6603884
7f02000ce
2e870164a
2d4900e35
cc1500dcc
c90b005d3
999b05943
772b0142d
4fc703e51
a6fd0a1e6
4c9102a4c
4a16005c4
db4703b9d
087500408
2b0f00015
154400604
b83502488
c0e70a9c0
190900011
7dfa07cc2
870100087
e92301deb
2f21005af
f281078c2
26870126a
786903248
76eb06bfa
fcc30c1fc
27f5026a3
931700c05
652700e8b
4ba902d33
829b04dc6
440600188
f61f0182a
f88908048
326f014a6
fa9408d40
92ed08682
eeee0d884
3c6601b08
9f2b01acd
f20800400
94ea08a28
27e60226a
89c606b86
6b6b02989
262e005c4
488602580
b843031f8
8f3901e97
ba76057c4
fef80f7c0
c90c00714
510100041
fbe60e022
cf9a07886
48d503d48
b0c008400
a13d024d5
a90000000
a6ad06ba6
cb3d02c97
6406001c8
948104a84
be2101a0e
c9c709c4f
27b801c90
