00000000000000006a912646
00000000befa49016b3f3773
00000000db1c6f6d684b9fcd
00000000e60261a16673e8c7
00000000ebd82e616518d9be
00000000ef7e5cbd640504a4
00000000f1ff410d631f8c4a
00000000f3d2f752625ac299
46581874f4f551695c4a1b79
2f0ec4d9f58f7c4c5c419a41
21bd5d3df65311465c2adb65
19672676f71093415c090273
11cca6f7fa3e1431585c3a3e
0bf8dad5fa911e8858529699
089e2298faf7047f583a2ce5
06820981fb590dd95816707c
0493f25afcfba8bf543f81a8
0316c667fd27994054350e1a
023a93a3fd5cb958541b3b81
01afb4f0fd8faf1553f5b63d
01306f1bfe6913bc4fecb4e2
00cddd3ffe8030e14fe1946a
0094cb77fe9bf4294fc6661f
0070bd6dfeb68ed24f9f0799
004fa757ff28380c4b5a83fe
0035f67aff345e6b4b4ebfb9
00270fdbff42ecc24b3225ea
001da26aff50dfce4b08c382
0014f87cff8ca832467c9a03
000e3b79ff930ed146702a7b
000a514fff9ab8c34651fee2
0007d65dffa2124346265562
00058e09ffc1b3464142076b
0003c6d7ffc5160b4134d9dc
0002bdf2ffc924574114e2fc
000215e3ffcd091240e69879
00017b02ffdddeb43b926b0b
0001021dffdfaba03b846445
0000bba3ffe1d46e3b6256c0
00008edaffe3e7d63b30f67c
00006580ffecea3735485a00
0000452affede0fc353952a2
00003245ffef09823514c776
0000263cfff0272134dfb090
00001b19fff4f9ea2e24d7ee
0000125bfff57f6a2e149311
00000d39fff620a42decd1d2
000009eefff6bce02db2b854
000006dafff93ed025ad12f8
00000461fff98a9a259a8b6d
000002dafff9eab1256b08d0
000001c9fffa507a251f1a1a
000000effffb34711aa438a1
00000029fffb4d421a9de463
ffffff53fffb82f61a82bbe3
fffffe41fffbeaa41a341da6
fffffd1dfffb08961129d780
fffffc04fffb1a9c11277c9b
fffffa6ffffb4e01111a5fb3
fffff7f5fffbc65b10ec90db
fffff39bfff9c7140bb164b7
ffffea69fffa64070b9c23af
ffffda76fff7a61b08210b43
ffffc057fff884f90811f429
ffff9308fff47aa305b39a37
ffff48defff5b6c205a8e803
fffec852ffefe7100403fda1
fffdf633fff1a68703fc6cc1
fffc8a80ffe95e8202d5779c
fffa3850ffebd60002d022d9
fff333b3ffe0f91102003bbc
ffdbeff1ffd427a0016a0840
ff9ae96effc1f2fe00fff0e6
fee787cdffa8056f00b4f764
fdac6974ff805be200800185
fc3620deff8b5513007f5470
f8212e56ffcba2b20077547c
da8ea98102a19400ffebb72b
