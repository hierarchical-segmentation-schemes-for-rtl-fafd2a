000060730000c0e80000001
0000bd400001b8600001ef0
00011a0d0002afd80003ddf
000176da0003a7500005cce
0001d3a700049ec80007bbd
00023074000596400009aac
00028d4100068db8000b99b
0002ea0e00078530000d88a
000346db00087ca8000f779
0003a3a8000974200011668
00040075000a6b980013557
00045d42000b63100015446
0004ba0f000c5a880017335
000516dc000d52000019224
000573a9000e4978001b113
0005d076000f40f0001d002
00062d4300103868001eef1
00068a1000112fe00020de0
0006e6dd001227580022ccf
000743aa00131ed00024bbe
0007a077001416480026aad
0007fd4400150dc0002899c
00085a1100160538002a88b
0008b6de0016fcb0002c77a
000913ab0017f428002e669
000970780018eba00030558
0009cd450019e3180032447
000a2a12001ada900034336
000a86df001bd2080036225
000ae3ac001cc9800038114
000b4079001dc0f8003a003
000b9d46001eb870003bef2
000bfa13001fafe8003dde1
000c56e00020a760003fcd0
000cb3ad00219ed80041bbf
000d107a002296500043aae
000d6d4700238dc8004599d
000dca1400248540004788c
000e26e100257cb8004977b
000e83ae00267430004b66a
000ee07b00276ba8004d559
000f3d4800286320004f448
000f9a1500295a980051337
000ff6e2002a52100053226
001053af002b49880055115
0010b07c002c41000057004
00110d49002d38780058ef3
