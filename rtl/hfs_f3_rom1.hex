0013c40020540057e8
0023be00333a00824b
00457a0054ea00c7c3
0077d6009d36013fbc
00b3d0007e1c0147f3
011705012fef02203b
01c1fc00d6be0237ea
029293029fd203f001
036104026afb03f6e6
047e8c01da75041ba8
060dec00ac60048e29
079d6806c23c0841ad
08ea2c069826084465
0a76280634950850fa
0c4c80058389087260
0e78c1046ca608b861
11064502d35f0938a6
13fd530099340a0eea
175d0dfda4a20b5a6a
1a206f1509d114ada9
1c0fbe14eae314aea5
1e05ce14ac2714b296
1ff626144f4214bb4d
21d94e13d6b914ca5b
2392cc134d0b14dfd7
25094c12c11114fa04
261de11248ba151435
26a36e1206cb15247c
2668ea1228c8151a9f
2530d212ed2b14dcd3
22ba4314a0441446af
1ebd3c179fe0132619
18f1501c57b5113a7c
111e652332880e39ac
0712822c9fdf09cd48
fac2fa33b46839f645
ec50dd349d2739eeca
dc14a836a59a39ce07
caaa7939e96f397f7d
b8e8343e58b038f18e
a7def743a8ed381d3f
98b6d34953f8370dc3
8c91444e9f3335e64f
8460e552b15b34e330
80c20a54b47b345405
81ec2253f45c3491e2
87a5dd4fffbf35efb9
914d8048be3438a9d6
9df5703e735c3cd959
ac95bb31a63a4273a3
bc1fe423152449479c
cba305df368c4a6cdd
da5edade4d1a4a743f
e7c929dca28f4a8ee1
f38e7fda707a4ac36e
fd88bed7f4cf4b12a3
05b96dd568514b7841
0c3861d2fb344bec51
1133e4d0cf4c4c6582
14db09cefd724cd995
17601ccd93f04d3ee8
18f78fcc96624d8dd0
19d075cc02234dc07c
1a1457cbcfe04dd317
19e370cbf8104dc294
195d0dcc6dfd4d8ed5
18987ccd267d4d383c
172435e5c3c526aaeb
14f0a9e60a8a26a662
12ac60e69b64269435
108096e76b4f266d39
0e81f3e869f7262da4
0cb796e987be25d47b
0b228aeab6e42562f8
09c089ebec1924dbe0
0806d1f5b58615a80a
0638ecf626401599fc
04dfe4f6d0bc156fa4
03dd2af791471527d4
0319b3fb6d560ea78f
0284d5fb91bd0ea303
02129dfbca3a0e94f8
01b9ddfc0c540e7c4c
01592cfdc9b00b6564
0102cbfdf3420b5b2c
00cd35fef50909cfae
00acfdff047309cbea
009821ffb1cf0926c3
009ff30046e60924b7
00bf2200e85f09bbc5
00e2e900d5fd09c095
01147101b8560b0829
0154810197c30b109b
019fc202ec070d52d0
01e5f402c9c00d5b5b
01ff3f04b21a111828
01ed3604b755111767
01ab3d04d971110e8d
01215e05427710e678
0035410665f116b975
fed08b06c18716ad7a
fcef2c07b466166fe6
fab18a0963ab15cd68
f86b490414131c8977
f69eb504834f1c7bc1
f5d51104e1f51c6580
f6610904722c1c920f
f82b73face001c350b
fabcd7fa277d1c4a8d
fd75fff8cbca1ca1b5
ffd3b2f7085e1d4a52
019167f6df8d143cd4
02a67ff69d751444e0
032e2df65c091454b8
035056f64403145d27
0312bef999cb0c492a
027701f9e9020c34a2
01d9b0fc5f160758bd
015aa2fc9d40074935
00fc30fdf6af049385
00b834fe17c4048b4c
0087b9fecf5302ff09
006525fee02902fad9
0042f7ff478b020d5b
0027dcff893a017616
0018c5ffb06d011314
