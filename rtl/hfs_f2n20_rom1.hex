4c9fac785999e5b98b07ffffeab38e
163128e0c9a49199880fffffa5b9b4
0b4f8a74d9af93a69d0afff4e86809
05745cc9bab53cdc9fbfffeb32e183
02b8ee96ddbac78bf875ffd92c2254
019bdd7867c00cafa87affb7e8b1b4
012064f962c0fbfbe65affb7adb7de
00ced0938ac5966576fcff7ae89a06
00931433cfc677a7ec99ff7a7c1717
00674096b6cb2286b5ffff0bff86f1
0049533942cc059e5ed8ff0b2388ae
0038f6301ad0967d42c9fe4461c2b9
002e940c70d0e770cd84fe441141d9
002704ad89d1604efafffe431efec8
0021da946ed1de556ea8fe419ea1e7
001c8d3067d621813597fce17c8bea
001755d3d0d671e8c96afce0de7582
0013bba490d6e35fb43cfcdf1d81b2
0011184f8ad760d419f0fcdc3219e4
000efb49e8dba69c2692fa746f3a05
000d693cc3dbc09ef982fa7439682d
000c5e6f7cdbe0df70e4fa73bcc81b
000b474ef1dc1277bfa2fa72a3a2e8
000a5d6bb3dc4aa7e76dfa70f461cc
0009969889dc86db5185fa6eadad12
0008eb7f4bdcc55cf7cefa6bd3735e
000856b3bcdd0506cc84fa686c3bad
000787c0ace131ce0c6ff64bc19b39
0006bcb48ae14ae11e60f64b5c960d
0006185f26e173bfb78ff64a15c3fc
000591394de1a63ffc7ff647b89011
000517ebefe1e309af49f643e91f41
0004b7c693e21fd78389f63f1ac52d
000464d671e25eaaca8af6392806e4
00041c8f75e29e74f430f6321e95f4
0003c52803e6bd372947ef5d4b8c4d
00035f5dc5e6d611a148ef5c85809e
00030d03b9e6feccb69def59fdb85b
0002c901c6e731763706ef55436d2e
00028fe67ce76a4be97fef4e2f30a3
00025f43e8e7a6dee2caef44bf1f36
00023557a7e7e5932e51ef390453d5
00020effe1e828ac3e1fef2a5632bf
0001ef242aec46fcd728e4462c3fa7
0001d2ea6eec4e53b69ae445ef42d4
0001b9bc2cec5b2c1da1e4451da5f2
0001a320cfec6c5bdc9ee4437b9ccc
00018eb9d6ec80f8d3cae440e13c75
00017c210eec986bf8f4e43d2f1659
00016eadfcecac5e2cb6e4397c9f67
00015ef7ebecc73a5ce9e433bffb71
0001508c64ece37c8915e42cd4a7df
0001434442ed00d5dd72e424ba0cde
000136fe53ed1f064415e41b726e20
00012b9e41ed3dd964c4e411021746
0001210bb7ed5d24526fe4056ec012
00011731aeed7cc3bb10e3f8bf1933
00010dfde9ed9c9a7a5ae3eafa76e2
000105607dedbc9077fee3dc289184
0000f86160f1d26c49fbd3a378d685
0000ea2d74f1d96abf1cd3a30872d4
0000dd82e9f1e5fd8f77d3a17718da
0000d224f7f1f6f5e612d39e4aa0f0
0000c7e351f20b672ec6d3993137d2
0000be9611f222986778d391f55d03
0000b5acbbf23d5842b4d387eb476c
0000adf555f25883f45bd37bf5de69
0000a6dee9f2750439c1d36da26de8
0000a05690f2928d8971d35cf1145a
00009a4c3af2b0e26a2ed349e746de
000094b22df2cfd09a88d3348e43ab
00008f7c9cf2ef2edc14d31cf1ed0e
00008aa152f30edb39bcd3031ff098
000086fec5f3282c8b85d2ed1540a3
000082b012f348228a30d2cf715fd3
00007c2f01f75dfd94e0bd7534b426
000075151bf764fdade5bd74539355
00006ec003f77191b41dbd71303d28
000069114bf7828a9ad9bd6ad6a5bc
000063f095f796fc93e5bd60a2f4a1
00005f4a0ff7ae2e578cbd522a4d10
00005b0d6af7c78d0583bd3f2a9878
0000572d20f7e2a3456cbd277f0fb4
0000539de0f7ff12b131bd0b180805
0000505621f81c8ee291bce9f5074d
00004d4dbdf83ada3029bcc41fcb9f
00004a7de2f859c0cf70bc99abb344
000047e08ff879198d63bc6aafac63
00004570a1f898c21929bc3746e638
00004329a1f8b89e1fecbbff8ef484
000040eb8ef8da44c1dbbbc06f405f
00003eece4fce9141143a746f40200
00003d0caefceb097114a746b2aeb6
00003b4844fceea63fb1a745c679f8
0000399d50fcf3ba0492a743d7f75d
00003809b9fcfa1a47dda7409edf78
0000368ba3fd01a1b77ba73bdf9971
000035215ffd0a2f6fb9a73569328b
000033c96efd13a66100a72d13aeba
0000328275fd1deccd71a722bea19c
0000314b39fd28ebda49a7165002a4
000030229efd348f319ca707b331d1
00002f4007fd3e3c315ea6fa7a9fad
00002e2f3efd4adaa5d9a6e7cd65e6
00002d2a7dfd57ef605ba6d2ce7019
00002c30fdfd656d182ba6bb77299e
00002b4208fd7347e0bea6a1c37310
00002a5cf5fd817501ffa685b142f0
000029812bfd8fead593a66740547a
000028ae1dfd9ea0a8a8a64671e223
000027e347fdad8ea179a623486a38
0000272032fdbcada80ca5fdc77bff
000026646dfdcbf751cba5d5f38bfb
000025af91fddb65cf80a5abd1ce6e
000025013efdeaf3dd6ba57f681714
000024591cfdfa9cb530a550bcbd55
000023b6d7fe0a5c0158a51fd6846e
0000231a21fe1a2dd23ca4ecbc86b6
00002282b4fe2a0e9420a4b77623ff
000021f04cfe39fb0664a4800af236
00002162aafe49f033a8a44682b03c
000020d993fe59eb6abba40ae53a8a
00002054d0fe69ea3856a3cd3a8169
00001f83a302749c541ea746f2d33a
00001e92c10276795faca7467a71e2
00001dafd7027a00a5c6a744b6d5ed
00001cd9b6027f01543ba740f7586d
00001c0f51028550a67da73aa9e819
00001b4fb9028cc9088ba731560f14
00001a9a150295495ddca72498d74d
000019eda5029eb465aba7142162de
00001949b802a8f03762a6ffae16eb
000018adb302b3e5d30ba6e70a3e19
000018190502bf80c238a6ca0c0d3f
0000178b2e02cbaec6c9a6a892f8fb
000016fcad02d90d0a11a68070f8e2
0000167b7902e637f926a6557f8ceb
000015ffd202f3c960dda625db88a7
000015895f0301b5963ca5f17d9294
00001517cd030ff21b47a5b8625a27
000014aad1031e757d50a57a89fa5f
0000144225032d373785a537f77342
000013dd88033c2f992aa4f0b036b8
0000137cc0034b57aef7a4a4bbc5d6
0000131f95035aa92f2fa454235c2b
000012c5d0036a1f4b07a3feecaafa
0000126f4b0379b314f6a3a52d481f
0000121bd6038960bf7fa346ed5837
000011cb470399240aaca2e43a8784
0000117d7803a8f91a37a27d232911
000011324703b8dc6beaa211b61435
000010e92403c8e33fa5a1a15471a4
000010b15403d5810858a14610c473
0000106cc903e57c3f75a0ced5d38e
0000102a6703f57b0d15a053805be3
