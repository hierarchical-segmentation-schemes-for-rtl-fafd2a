b475e43fff8e3
bcd04d7ffeaba
c141067ffda6b
c415087ffca4c
c6ff423fdeb0a
c9c4d9bfde0e7
cbd2077fc2fb5
cd735abfc29af
cecdbc3fc1f42
cff5d9ffc11b6
d16b86bf910c2
d30a5b7f9045f
d463007f8ef49
d589d6ff8d404
d68b7b3f38590
d77046bf37eb4
d83e0aff37212
d8f8ffbf360c3
d9a44c7f34b8c
da425d3f33307
dad5187f317ae
db5e027f2f9e2
dc1ac13e9d0da
dcff2a3e9c2e7
ddcc9e7e9a981
de8750fe986bf
df3265be95c34
dfd046fe92b11
e062d8fe8f44a
e0eb9f3e8b89e
e16bd3fd92e96
e1e47a3d92731
e256693d91916
e2c2567d904fb
e328dbfd8eb78
e38a7dbd8cd13
e3e7adfd8aa3c
e440cf7d88358
e496393d858bc
e4e8373d82ab5
e5370d3d7f986
e582f6bd7c56b
e5cc29bd78e9a
e612d5bd75542
e657267d7198f
e699423d6dba8
e6f85abbd7446
e770f2fbd6560
e7e2d57bd4910
e84eb77bd20c2
e8b532fbceda8
e916cbbbcb0cb
e973f37bc6b0d
e9cd0d7bc1d34
ea22703bbc7ee
ea7467bbb6bd3
eac337bbb0969
eb0f1bbbaa128
eb58497ba337b
eb9ef0bb9c0c1
ebe33cbb94952
ec25547b8cd7a
ec655af911837
eca370b911087
ecdfb2b91018a
ed1a3bb90eba8
ed5324390cf45
ed8a82f90acbb
edc06c790845c
edf4f3b905676
ee282af90234e
ee5a21f8feb27
ee8ae8b8fae3d
eeba8cb8f6cca
eee91b78f2701
ef16a138edd15
ef4329b8e8f34
ef6ebf78e3d88
ef996c78de83a
efc33ab8d8f70
efec32f8d334e
f0145d38cd3f5
f03bc1b8c7185
f0626838c0c1b
f08856f8ba3d5
f0ad9578b38cc
f0d22978acb1a
f0f61938a5ad7
f1196a789e81a
f13c2238972f7
f15e45f88fb84
f17fda38881d4
f1a0e3f8805f9
f1c1677878805
f1f12a74e8cf1
f22f3e34e7d83
f26b7e74e5f79
f2a605f4e33a9
f2deecf4dfad7
f31649f4db5b6
f34c31f4d64ed
f380b834d0915
f3b3edf4ca2bb
f3e5e3f4c3263
f416a974bb886
f4464c34b3597
f474d9f4aa9fd
f4a25eb4a161d
f4cee63497a52
f4fa7af48d6f3
f525277482c50
f54ef4b477ab5
f577ebf46c26a
f5a015b4603b1
f5c7797453ecb
f5ee1ef4473f2
f6140d343a360
f6394af42cd49
f65dde741f1e0
f681cd7411155
f6a51df402bd5
f6c7d533f418b
f6e9f873e52a1
f70b8c33d5f3b
f72c9573c6781
f74d1833b6b95
f76d192f5d460
f78c9bef5cc89
f7aba46f5bd0e
f7ca366f5a62a
f7e8552f58815
f806042f56303
f82346af53728
f8401faf504b5
f85c922f4cbd9
f878a0af48cc1
f8944e6f44797
f8af9d6f3fc86
f8caab6f3ab60
f8e5446f354ef
f8ff862f2f90a
f91972ef297d4
f9330caf2316e
f94c55af1c5fa
f9654f6f15596
f97dfc6f0e062
f9965e2f0667b
f9ae762efe7fd
f9c646aef6504
f9ddd12eedda9
f9f5172ee5206
fa0c1a2edc234
fa22dbaed2e4b
fa395d2ec9662
fa4fa02ebfa8f
fa65a5aeb5ae7
fa7b6f6eab780
fa90fe2ea106d
faa653ae965c2
fabb70ee8b793
fad056ee805f1
fae506ae750ef
faf981ae6989d
fb0dc8ae5dd0c
fb21dcee51e4e
fb35bf2e45c70
fb49706e39784
fb5cf1ae2cf98
fb7043ee204b9
fb8367ee136f8
fb965e6e06660
fba928adf92ff
fbbbc6edebce3
fbce3a2dde418
fbe0836dd08ab
fbf2a32dc2aa6
fc049a6db4a16
fc16696da6706
fc28112d98182
fc39926d89993
fc4aed6d7af45
fc5c236d6c2a2
fc6d346d5d3b2
fc7e216d4e282
fc8eeaed3ef19
fc9f916d2f981
fcb015ad201c2
fcc077ed107e7
fcd0b92d00bf7
fce0d96cf0dfb
fcf8b9a9d1ad4
fd183c29d0b1f
fd374469cec22
fd55d629cbe52
fd73f4e9c8220
fd91a3a9c37f6
fdaee5e9be03a
fdcbbea9b7b4e
fde830e9b098f
fe043f69a8b58
fe1feca9a00ff
fe3b3ba996ad7
fe563be98c8da
fe70d52981bf9
fe8b16e97642f
fea503a96a1c2
febe9d695d4f7
fed7e6694fe0e
fef0e02941d47
ff098d29332df
ff21eea923f11
ff3a06e914215
ff51d76903c21
ff6961e8f2d6c
ff80a7e8e1626
ff97aae8cf683
ffae6c68bceb1
ffc4ede8a9ede
ffdb30e896738
fff13668827e8
000700286e11a
001c8ee8592f4
0031e46843d9f
004701a82e140
005be76817dfc
00709768013f7
00851267ea354
00995967d2c33
00ad6da7baeb5
00c14fe7a2afb
00d501278a122
00e8826771149
00fbd4a757b8d
010ef8a73e009
0121ef2723eda
0134b92709819
014757a6eebe1
0159cae6d3a4b
016c1426b836f
017e33e69c766
01902ae680646
01a1fa2664027
01b3a1e64751e
01c522e62a541
01d67e260d0a4
01e7b425ef75d
01f8c525d197f
0209b225b371d
021a7ba59504b
022b22257651b
023ba6655759f
024c08a5381e8
025c49a518a08
026c6a24f8e10
027c6a29d1b4f
028c4a69d135f
029c0b69d039f
02abada9cec2d
02bb31a9ccd26
02ca97a9ca6a8
02d9e029c78cf
02e90be9c43b7
02f81ae9c077c
03070de9bc437
0315e529b7a04
0324a129b28fb
033341e9ad137
0341c869a72ce
035034a9a0dd9
035e86e99a270
036cbfe9930aa
037adfa98b89c
0388e6a983a5d
0396d5697b603
03a4abe972ba3
03b26aa969b51
03c011e960522
03cda1e956929
03db1b694c77a
03e87e2942029
03f5caa937347
040301292c0e7
041021e92091c
041d2d6914bf7
042a23a908989
04370528fc1e4
0443d1e8ef517
04508a68e2334
045d2ea8d4c4b
0469bf28c706a
04763c28b8fa3
0482a5a8aaa03
048efc289bf9b
049b3f688d078
04a770687dca9
04b38ea86e43c
04bf9aa85e73f
04cb94a84e5c0
04d77ce83dfcc
04e353682d570
04ef18a81c6ba
04facca80b3b6
05066f67f9c70
051201a7e80f5
051d8327d6152
0528f427c3d91
053454e7b15be
053fa5679e9e6
054ae6278ba13
0556172778651
056138a764eaa
056c4aa751329
05774d673d3da
058240e7290c5
058d25a7149f6
0597fbe6fff77
05a2c326eb151
05ad7c26d5f8f
05b826e6c0a3a
05c2c366ab15b
05cd51e6954fc
05d7d2a67f526
05e245a6691e2
05ecaae652b39
05f702e63c134
06014d66253db
060b8ae60e338
0615bb65f6f51
061fdee5df830
0629f5a5c7ddd
0633ffa5b005f
063dfd2597fc0
0647ee257fc05
0651d2e567538
065baba54eb5f
0665782535e83
066f38e51ceaa
0678eda503bdb
068296a4ea61f
068c3424d0d7c
0695c624b71f8
069f4ca49d39b
06a8c7e48326c
06b237e468e70
06bb9ce44e7b0
06c4f6e433e30
06ce4624191f8
06d78a63fe30e
06e0c423e3178
06e9f323c7d3d
06f317e3ac661
06fc31e390cec
070541e3750e3
070e47635924c
071742e33d12c
0720346320d8a
07291be30476b
0731f9a2e7ed4
073acd62cb3cb
074397a2ae656
074c582291679
07550f2274439
075dbce256f9d
076660e2398a9
076efbe21bf62
07778da1fe3cd
07801621e05ef
078895a1c25cd
07910c21a436b
079979a185ecf
07a1de61677fe
07aa3a6148efa
07b28da12a3ca
07bad8210b672
07c31a60ec6f6
07cb53e0cd55b
07d38520ae1a8
07dbade08ebdb
07e3ce606f3fb
07ebe6a04fa0d
07f3f6e02fe15
07fbfee010017
