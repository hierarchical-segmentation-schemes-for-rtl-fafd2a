13b757ffaeea5323fffd0b4
05abc63fba916d7bffe9fb5
02e01da4c5b7120bfdebb52
016102dbcb61b5fbfc2fc2c
00afa487d0efc973f910f18
0067925ad638994bf385c50
0049a1bcd71951b3f378477
0033b5bedbc49bbbe9d1502
0024c875dca593cfe9b63af
0019d566e1506d17d92e2f5
00126176e2319fabd8f7ddc
000e4537e6c4545bbd74f5a
000ba9abe714dfdfbd611a0
0009dcf6e7865d33bd28e48
00088ad8e8041e53bccb21d
0007218aec500a8b91182a4
0005d4a0eca0827f90f06b9
0004ee48ed120c7f907fe81
00044543ed8fd15b8fc44d6
00039092f1dba84b4e8cd5a
0002ea12f22c43074e3d193
00027718f29daacf4d5c368
00022299f31b700b4be4f1f
0001e240f76000faf5d492e
0001af7bf778ee22f5bb965
00018657f7a1b752f56a4c9
0001644cf7d487faf4d241f
000147d5f80d43faf3efcac
00012f88f849da4af2c16f4
00011a92f8889a8ef149831
0001084ef8c86f42ef8b2b6
0000f11dfceb96129d1b37d
0000d7bcfd0480ae9ce93ff
0000c32cfd2d46ca9c46bae
0000b225fd601c029b1685e
0000a3eafd98d88a99518c1
000097c3fdd56ec696f4cea
00008d48fe142e7e9404f5a
00008427fe54047690882d4
0000788e027727029d1aa14
00006bda02901e0e9cb666e
0000619202b8ec0e9b70d36
0000591502eb9e269911fc4
000051f503246af695872b0
00004be10361018a90cda1f
000046a1039fe3e28aea5b5
0000421303df970283f4556
