// Published random division vectors: per vector x (units of 2^-54), d and the
// quotient q (units of 2^-53), each on its own line; the comment gives its number.
// 0
21058f90820b20
1eeeabdfbddd58
1114ad1454c876
// 1
1858f5ec90b1ec
11728c0822e518
1653defe976eef
// 2
1a5f77d014bef0
11145795c228af
18b4c277686af3
// 3
2b0edc9a561db8
1fa9b23e9f5364
15c21cd944dc6c
// 4
2f9c048c1f3808
1cc487cc398910
1a7ab96457e514
// 5
21ebb54903d76c
1cbc143a997828
12e33f908319bb
// 6
19f05113d3e0a2
134f67c1e69ed0
157e0647a4d846
// 7
36c70f242d8e1e
1bb9b9de177374
1f9c83b0080cb2
// 8
3494e8c52929d2
1df22e94bbe45d
1c18177fa045fc
// 9
14bf4ad8e97e96
14338da928671c
106ead42dbff96
// 13
1b350acad66a16
1632f4ec8c65ea
139c10a95af39c
// 15
38f923a8f1f248
1f5636739eac6d
1d16ea10294201
// 16
16f61aa84dec36
14d587c0e9ab10
11a2379ed4d6b7
// 17
219184f743230a
1155927842ab25
1efc0d73b30b5d
// 18
2bd3bead97a77c
165030c8eca062
1f6d434d8e1d51
// 19
21fe896dc3fd14
1db7e19cfb6fc3
124d59bdd0209e
// 21
34e7ebaf29cfd8
1d0509a91a0a13
1d2b70d368cf2b
// 22
2a890e3b15121c
15d77d69abaefb
1f28b030a8aa67
// 23
317d870e22fb0e
1f8efb801f1df7
1917619efc3c72
// 24
279357fccf26b0
1d7e0e601afc1d
1578617d1fff1a
// 25
278512528f0a24
16f28b956de517
1b8e150c072d89
// 26
1ed9453ffdb28a
1b93eaa8f727d5
11e5d034c86e9c
// 28
2814e4af9029c8
15f6334babec66
1d3379a1046581
// 30
1dfda2145bfb44
1a3b75691476eb
124add6798c4d8
// 31
24682eed08d05e
14f3bcbc89e77a
1bcd53a83bab48
// 32
1f10fd2a1e21fa
12fcd9f245f9b4
1a2d978e8bf7c3
// 33
16494f34ec929e
14fadc80e9f5b9
10ff0fb5ed86f7
// 34
194d0abb529a16
174893ebee9128
1162e79917a33b
// 35
25657c3b8acaf8
1c61c35078c387
1514f47b6660aa
// 36
327b668ee4f6cc
1d26b3f57a4d68
1bb52c7c47c750
// 37
32cd99f3259b34
1e823a651d0475
1aa4aa08b6c1dd
// 38
12fe315f05fc62
12259080a44b21
10bf0063f849bf
// 39
1e1135e53c226c
16c7dd5d8d8fba
151e1f5462d8da
// 40
1fa39ee0df473e
11d3bf0e63a77e
1c6579f468298b
// 41
3b74d1e5f6e9a4
1e7ce420bcf9c8
1f33df76f9b50c
// 43
1608d2c8cc11a6
11721c0f42e438
14355d4ac18ef3
// 44
1e71c4bfbce38a
13c7b65d678f6c
18a05291f85269
// 45
289ffa24913ff4
1c6f66d3f8dece
16dbe58b19f8ad
// 46
1e032bc67c0658
16841488ed0829
1553b883b0fbd2
// 47
22c64721058c8e
1d1428f09a2852
13224cda318e56
// 49
241e0ae2c83c16
12cdf936a59bf2
1ebb0ddd76b9d7
// 52
23d0ef0987a1de
18968980b12d13
174e6f9ac79778
// 53
16b4f45e0d69e8
14e6a8e3e9cd52
1161e48aa1a2f5
// 54
1abc1a01757834
14c62a43498c54
1497430085a7a6
// 55
1bae8641775d0c
1a5fb8e234bf72
10cb1c734973d3
// 56
2d33d2a39a67a4
1968ef3472d1de
1c767f4843dc07
// 57
18dc9d02f1b93a
14019309480326
13e2201fe651c4
// 58
23c90150c79204
1ee56fcbddcae0
128823e79f9355
// 59
1573af188ae75e
1056456800ac8b
1502670bbee259
// 60
255a4c524ab498
19c3ac2af38758
173250548f0372
// 61
1cc5ac3c198b58
10b051efa160a4
1b95b064d53012
// 62
208f8167c11f04
1e28cfccbc51a0
11461a8fa70d02
// 63
1dc47ae05b88f6
19c8af2f53915e
1278d364f700fb
// 64
2baa852497550a
1fd38051dfa701
15f3c95e28171b
// 66
292a87c2525510
1bc664ed378cca
17b6ce3217758a
// 67
1cfd033cf9fa06
167dbb65ecfb77
149f3e445b4b88
// 69
36c8c893ed9190
1f19086f7e3211
1c2fd62de78533
// 70
187821de70f044
1712ea8b6e25d5
10f7b3cf0f0162
// 71
32f182a365e306
1f120b303e2416
1a3bd526e64bba
// 72
20f7b37fc1ef68
12555e54a4aabc
1cc58091f3c088
// 73
13139e3986273c
12605a6844c0b5
109c1538dfaaa5
// 74
22759c40c4eb38
18874d52310e9b
167a5a2fb05d79
// 75
256d3fa0cada80
13e7f449a7cfe8
1e152ab835b1f9
// 76
2495f2fa492be6
1f7c4c0c9ef898
12977e36a51150
// 77
1498463969308c
1292ba31252574
11bdd861547b88
// 78
1da51bd95b4a38
125cc119c4b982
19d4c42bcd63f7
// 80
246082d708c106
18f211c691e424
1755021ccc264c
// 82
2970ed6792e1dc
1541aaecaa8356
1f3173436f9128
// 88
13fc8d37a7f91a
13916dd00722dc
105796f7da6c52
// 89
252d8760ca5b10
15375b582a6eb6
1c098b0dbb01be
// 90
1c18bb22383176
154d6380ea9ac7
151a683c4f7816
// 91
323e9f43e47d3e
1e63b49f7cc769
1a7425527870ce
// 92
29935f1b1326be
1db795db7b6f2c
16627f62196284
// 93
21ecdda103d9bc
126ecb66e4dd97
1d729f538e3b71
// 94
2028adea40515c
1d51d8313aa3b0
118ca3c058c4a9
// 95
15e929d2abd254
12449860c48931
1330ca66223720
// 96
2c87d3ef990fa8
1e2dd1827c5ba3
179bd9d8d53aef
// 97
32143b5b642876
1afc60abb5f8c1
1db12871b83577
// 98
26def8de0dbdf2
164d5e606c9abd
1be2fff4c9388f
// 99
28238b9b104718
1c631ef6f8c63e
169fa6d816d960
