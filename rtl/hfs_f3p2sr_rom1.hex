000f156000215000015f6
000fac3000214700015f6
0010358000213500015f7
0010c08000211b00015f7
001159d00020f500015f9
0011f5000020c400015fa
0012948000208900015fd
00133a200020400001601
0013eef0001fe60001607
0014a5d0001f7f000160e
00155e60001f0b0001617
00162820001e810001623
0016f760001de50001632
0017cc20001d390001643
0018adb0001c730001659
00199920001b970001672
001a9630001a9a0001692
001b976000198800016b6
001ca42000185a00016e1
001db4c00017160001711
001eda100015a8000174a
00200ce0001415000178c
0021574000124f00017da
0022a3200010720001830
00240310000e620001893
002573b0000c220001904
0026f5d00009af0001983
0028840000070f0001a11
002a2c000004290001ab3
002be8a00001040001b69
002dbb2ffffd9a0001c36
002fa4bffff9e50001d1c
0031b5dffff5c30001e24
0033d27ffff1680001f44
00360a8fffecb00002085
00385fafffe79500021ea
003ad39fffe2100002378
003d683fffdc180002532
00400b0fffd5d5000270d
0042e5efffcee0000292c
0045e7cfffc75c0002b85
0049130fffbf3e0002e1e
004c6a4fffb67a00030fe
004ff05fffad02000342c
0053a83fffa2ca00037af
0057a52fff97930003ba1
005bcb5fff8ba50003fea
00602dbfff7ec400044a5
0064d05fff70dc00049dc
0069b77fff61d80004f9b
006ee7afff51a100055f1
007465ffff401f0005ceb
007a37bfff2d35000649a
008062cfff18c60006d10
0086d25fff030e0007639
008dc17ffeeb3a0008076
00951e0ffed1780008bba
009cefeffeb59e0009820
00a53f8ffe977f000a5c5
00ae164ffe76e9000b4c9
00b77e0ffe53a6000c550
00c181bffe2d7b000d77f
00cc2d0ffe0425000eb84
00d78cdffdd75f001018c
00e40aeffda5660011a88
00f104bffd70ac0013550
00fee0dffd377d00152ce
010db15ffcf970001734b
011d89affcb6150019715
012e7f3ffc6cee001be86
0140a93ffc1d72001ea00
0154211ffbc70a00219f1
0169029ffb690e0024ed1
017f6c2ffb02c70028929
01977f0ffa936a002c98e
01b15f9ffa1a1700310a8
01cc623ff999cb0035cd6
01ea496ff909e8003b360
020a808ff86ce3004130b
022d3c1ff7c16c0047cda
0252b5cff70614004f1ec
027b2d1ff639410057384
02a6e7aff5592e006030a
02d7e4cff45b03006a7e0
030b379ff34d7e00758cb
0342ceeff226170081d03
037f112ff0e21e008f6bd
03c06f0fef7e98009e871
0407649fedf83900af4e4
04547a3fec4b5500c1f2e
04a4c9dfea879300d5cd3
0501720fe8789f00ed370
05647abfe63f2a0106cbe
05d0545fe3cc46012343a
0645d6dfe119e40142f3c
06c5edffde215801663b8
075199ffdadb4b018d844
07e9f0bfd73fb901b942d
08901dcfd345e001e9f7b
0945623fcee44402202fe
0a0b139fca10aa025c854
0ae2996fc4c027029f9e0
0bcd695fbee73302ea2c8
0ccd00cfb879ce033ced5
0de2db5fb16bbb0398a4b
0f10658fa9b0d903fe19e
1056e9cfa13da7046e109
11b776af9807f504e93f1
133224ef8e0bdf05700a2
14c83a5f833d760603461
167882af77a19206a2e4f
18413d1f6b4117074e9ea
1a1f2b0f5e2fb0080590e
1c0d119f508fa808c6037
1e031d7f4296c4098d1b8
1ff6263f3494360a567ca
21d6d0af26f7b80b1bd50
239093bf1a59c50bd454d
2508aaef0f84a80c74141
261de0af0777950cebcc8
26a3bb1f038c850d26860
266893bf054cf20d0bf75
2530d22f0e976c0c7e331
22b975cf218ea20b5a812
1ebbdcff407ded097ae63
18f14faf6dbe8706b7b2b
111e657fab5dc202ed02b
071281fffb1e51fdface8
fac280105da06af7d28bd
ec505fe0d21a32f07c44e
dc14a8b1560055e81cd93
caa951f1e49f20defd70e
b8e833f2771711d58cca2
a7def77304b132cc5ad31
98b69273839f7ec40cfe0
8c907693ea1bdfbd4be1b
8460e5642faa30b8add42
80c209d44ea42db69bc5a
81ee29744481bfb74afca
87a6b31412c986baab358
914bcf63be6109c0709c7
9df502934ecba5c81f6ee
ac954382ccfc8ad11f9ad
bc1f6932421a51dad21ed
cba2f9f1b67bc3e4a329e
da5ed96130f775ee16fef
e7c92970b6901af6d0aba
f38e24804a7145fe932cf
fd88bd8fee2625053e657
05b96c4fa1e3830aca8c1
0c39ba6f64f3170f40fa8
1133a09f35fec612b7166
14d9724f13594215493de
175d4b8efb4df51714f97
18f78eaeebe25e183db9c
19d0acdee3abe818dcc83
1a14437ee11990190ee16
19e3705ee2f91d18ea152
195d0c8ee8288d1883a5a
18987bbeefca2417ebf5a
17a8dc1ef926801730bbd
169d54af03aa92165d18d
1581acef0ee2951579ea7
145ee5df1a74d7148e273
133bc10f261cff139f314
121d33af31a7fb12b1208
1106c7bf3cf08111c701a
0ffaebaf47dc2f10e30c1
0efb135f525a721006b2c
0e086caf5c5d580f3337b
0d2345bf65dffc0e6921c
0c4bb11f6edfe60da8c5a
0b817e2f775d710cf23c9
0ac44cbf7f5b000c45736
0a139c1f86dc6a0ba2368
096ed6df8de6820b083b7
08d55b3f947ebe0a77280
084681ef9aaaef09ee97f
07c1a2bfa07110096e210
074617cfa5d72208f5569
06d3403faae30c0883cbd
0668b8efaf981708194d3
06057c7fb400d507b4ffb
05a93bbfb81feb0756ba0
055373dfbbfa5706fe1b8
0503ab6fbf94c806aac95
04b9702fc2f3ac065c6c3
047458afc61b230612b2b
0434029fc90f0c05cd4fc
03f8136fcbd2fc058bfba
03c1a13fce59710550046
038bffafd0d991051453b
035b67cfd320aa04dda9d
032e0b3fd543d104aa1a3
0303ad2fd74582047971b
02dc156fd92807044b80b
02b7106fdaed8004201b0
02946e7fdc97e603f7175
027403dfde290a03d04f6
0255a80fdfa29d03ab9f9
023935cfe1062e0388e6b
021e8adfe2552e0368061
0205878fe390f50348e0f
01ee0eafe4bac1032b5ca
01d8054fe5d3b6030f607
01c3528fe6dce602f4d54
01afdf7fe7d74d02dba59
019d96efe8c3d602c3bd6
018c653fe9a35b02ad0a2
017c384fea76a402977a7
016cff5feb3e6e0282fe2
015eaadfebfb66026f864
01512c8fecae2e025d04a
0144771fed575d024b6c5
01387e1fedf77e023ab0f
012d61ffee8cc5022b057
0122be0fef1c67021bdfc
0118b6efefa464020d776
010f435ff0252701ffc30
01065b0ff09f1001f2ba1
00fdf5fff1127a01e6547
00f60ceff17fbb01da8ab
00ee98fff1e72001cf55b
00e793eff248f501c4aef
00e0f7cff2a57c01ba906
00dabf2ff2fcf601b0f45
00d4e4eff34f9f01a7d57
00cf645ff39dad019f2ed
00ca390ff3e7550196fbe
00c54f3ff42da6018f1f3
00c0c36ff46eff0187c88
00bc815ff4ac780180d99
00b885cff4e637017a4f0
00b4cdaff51c60017425b
00b1562ff54f13016e5ac
00ae1c8ff57e710168eb8
00ab1e7ff5aa940163d58
00a859aff5d396015f16a
00a5cc0ff5f991015aacc
00a3739ff61c9a0156963
00a14e9ff63cc40152d14
009f5b6ff65a23014f5c8
009d987ff674c7014c36b
009c047ff68cbf01495eb
009a9e0ff6a2180146d39
0099642ff6b4de014494a
009855aff6c51d0142a13
009771bff6d2dc0140f8c
0096b75ff6de24013f9b2
009625fff6e6fa013e880
0095bccff6ed65013dbf8
00957b4ff6f168013d41a
0095610ff6f306013d0eb
00956d7ff6f241013d272
0095a06ff6ef18013d8b7
0095f99ff6e98b013e3c6
00978ec00049130024925
009bcc200047fc002492e
00a2b3c000447f0024966
00abebd0003d890024a0f
00b7e93000317e0024b92
00c6b190001ef30024e7b
00d879c00004370025382
00ed98ffffdf330025b9f
010673cfffad6c0026816
0122e35fff6d5b0027a22
0142d25fff1d760029320
01665d8ffebbae002b4c2
018c586ffe49b8002df81
01b2f9dffdcc36003127b
01d72ffffd4d9900349d3
01f38aeffce3820037b72
01ff51fffcb4d00039296
01ed361ffd027d00368f0
01ab3cdffe2c7e002c0ac
01215de000bcff00139e3
003541e0055ba8ffe555e
fed09f300cae64ff98570
fcef2b8017088dff265e2
fab17e4023ec3efe92161
f86b4530319074fdee6f8
f69eb6503ccb08fd6242f
f5d5058041e3dcfd204fc
f66108c03e2bf8fd52de9
f82b89f0319d37fe02f76
fabcf3801efcc9ff112f0
fd7616600a9120004372e
ffd3b19ff83e83015f490
019166aff6df8d0050f35
02a67eaff69d750051138
032e2d0ff65c09005152e
0350567ff64403005174a
03323e6ff66302005134c
02f1262ff6b4ce0050670
02a0b93ff72d92004efc2
024d59aff7bf6f004cfd8
01fe2e7ff85da2004a851
01b620aff8ff8f0047ad2
0176757ff99e8b004492f
013f8cbffa355f0041564
01107f7ffac25d003e092
00e879effb444d003abd5
00c6ac3ffbba810037829
00aa222ffc256e0034614
0087b94ffecf53000bfc2
0065248ffee029000beb6
004c4a4ffef8af000bbac
003a2defff139f000b6a7
0027dbbfff893a0005d85
0018c4dfffb06d00044c5
