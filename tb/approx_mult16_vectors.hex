0000000000000000
fffffffffffefff9
0001000100000001
ffff00010000ffff
8000800040000000
aaaa555538e3bcb2
73cfdda164434e8f
8f4ddb5b7aca0b7f
ec99c7fdb8d608b5
773473ab35dd5f3c
8201dae46f2af384
965e309d1c9003c6
2f45cdcc26022f74
830c79cb3e593ddc
a13f9d2c6300f9f4
cb002fa925cc2300
181872530ac341b8
4dab244c0b04ff74
173689e70c829e5a
cf44e3efb88cdb2c
b185a26b70a0ef17
0ab8986e06637fd0
fb71656a639d91b2
f6fa73f76fe2f346
a767bd297bb39dd7
9d95a66b6670b1c7
28519f851921f655
03d7d4ea033214d6
8743102b088d74b9
0f3e0920008d3800
30b1e12b2ad6ccc3
3def99802523da00
07b3c73205ff7cc6
76c4538726c100ec
70c6974942a70f26
d7a932002a219000
84e53bd01f0e1b20
a3ea4b4d303a1ff2
7ff1012d0096cd85
a99615c10e6aea96
7513a7a14cab3b93
473568221cf94f2a
ff668d1f8ccbed1a
fee5ee82ed7b36ca
d718154c11e73ac0
b53341052e07d687
50b6c20b3d2f96d2
3acb834c1e2a0f74
49fe079d023551c6
11fa902a0a215f84
c42b1ba1152e3bab
66801b980b0d9000
d8b94a783f0cf7b0
62f2111b069d2786
f542045204243104
d8e9af55949251ad
002336a80009f7b0
35b0ed5231c6ef60
e9070d650c31bfbb
7851601e2d2e1e96
faf8b57ab1ea2330
65bd6b772ab54963
12b290f50a977fc2
a12332d01ffdf7a0
c74cacc686817ee8
4510563e1745f460
164f4fab06f327c5
552403e0014bdc80
f6cd68f96533e875
c20eec3fb315a912
1e3422740412a720
3f13b4ff2c9aaeed
19de02cd004a9346
0f5577060721f70e
cc097ca06355e280
2d7cae9c1f070760
8f2d303a1afa6c72
728a82453a49bad2
30d0fc3b30198df0
bb5dc4ff9030b753
21876b520e1037ae
a4ca623d3f3eff32
1dd365150bc80577
6bb6fd746aa53fb0
367e001e0006b484
4511dd443bb47944
f88ef990f2501500
cdac97bd79eacb6c
4ddcff764db3fa68
e28605060472b934
35f12ff30a1b6603
64effeef64836dd9
dab89a1d83acbf58
a44f93b35ecd8835
19af0ac7011568c9
fd42257725144f96
36977108181cd670
421e027300a3f3c2
c5ce9c3e78ba7f84
5436d48d45ee1ec6
4bdb62dc1d4c0fd4
12ca130401664c50
1711356f04d20dc7
952ea2f75ef7e0e2
3e3603f800f97aa0
99ed5e6138bfc72d
5f279f453b35485b
740520910ec33aa5
f58996579033c2ef
7bd5d51567133d79
931722bf13f8eb29
ddd462d755a69a8c
2ecda0931d5b352f
27754f910c44fcc5
e88e3a77351f2842
d15b9c467fcdffaa
3fdfb9b32e565b65
3096289107b5dd16
bd4aa1047710dc50
f0be8dce855b0404
3253afdd22946527
f33c63615e6dfdbc
e1d77b866cfaff1a
9a8114180c21f030
6be40c22051dffc8
1a951bea02e77cb2
09e8832905153e28
f67241533ee46976
3d08bd652d274148
b45f644046a36f00
41c96bba1bb10732
d2dfe7a2bece7ebe
98b27db24afae6a4
4b1e85232711a842
2ce9ede229bc8792
b869fa28b435dd90
119b205b023bfee9
3a787ab31c0727f8
8f32a74c5d95f670
da369da986641d66
9d4212fa0baa7fa4
47bc365f0f3dee9c
ead8ea3ad6e02e30
3437bfbd271ba51b
043e11b4004bdbb0
44e969531c5aab0b
72193fc21c6d3b32
0f7a0bed00b8cab2
2d1e482e0cba35c4
5e6887ef32214b18
9279f91a8e88f552
21af1799031d2757
5cb5236e0cd5aa56
e414734966b6da54
fb0154ba531318b2
a82cbb9f7b41b76c
b0f3859d5c5c80a7
959df2658dac3731
23ed97021533b9da
08fbec70084bf5a0
0494798c022e1aa0
e9035b83534dfc09
b3724fd237f4fd24
f678089608453b50
0571992e034381b6
a2dc13280c317540
7b731138084f61d0
bb014fa13a2c3681
51a322f80b28f9d0
ffd5128a12884352
134473fd08baf564
8bcc5e2633692de8
bcac0b620864d5d8
e673efaed7c2845a
bcb1bcb58b1979c5
b42521291756a935
cb13f6a0c3a4f780
ea3d57745006f7a4
5a1115bd07a6a8b5
af6579285302fd10
e69d13e211ea6cba
df00db77bf2fb700
6acaf1b964d5f62a
ca6007bf0620fa60
dd0c7ffb6e85765c
92a303b80223ffd0
9ffda98a69f53ee2
61e06111251d4fe0
952a032f01dbc7b6
9bde127e0b427744
1488173401dc61c0
a3b01d9612edfe20
fe4a41d84168eea0
e13a6a8f5dc2fa26
ba6b54843d8e2654
6370ef2b5ce6fc70
bc2bb1b482a05cf4
94b9752f441541c7
70c6766e342cff74
d69f8a8f742bd019
157284c90b21f282
c00d83b862d12730
07a04f6b025e79e0
99ed16750d81c9d1
7b1f05b402bf4bf4
3aeff517386d11b9
b2c61ce614307b34
7f4bc7aa63491fb6
9d50a8fe67db9e60
eba37c7d72970fd7
417ee57b3ab79322
02e55e320111786a
4d1024aa0b0aa420
ad9a9c9c6a35ff70
33db84b51ae37237
2b6bc0f720bae23d
e7dd57af4f6caad3
a8f5ee289d2f7f10
71227f91386315a2
e4483dd1372008c8
53b3679e21e204da
aa7840272ab835b8
32d1a259203cb371
6e4fcdc058a9ff00
ce55c12f9bb6099b
ea0a33462ee2c664
e15936d530461bad
62693836159d3326
9546ebb989753ea6
510535bb11032eb7
22dc227204b16a38
7f1859ca2c94bcb0
d64be549bfefff73
d9450a6208d0460a
b612106b0badd146
f333faf8ee6cf9d0
46dcd2653a3cb92c
2b4c1ce204e28c98
735d78aa36633fc2
4671ecfc4136f8b4
36cdd4b52d894371
69fa61ee288c1af4
a030851d534da670
7e6eac1154fbdf6e
50bcb75d39d6376c
d6d0d786b4db0ce0
fb669ff19d115da6
73d55202251cb7aa
131ed4270fd8b4d2
080f4733023ef5b5
df719b8887c2fe10
0a9eada207346a3c
b56847f432fde6c0
92115aad33bef4a5
4f1ca637335f107c
caa09064724a6a00
04e4a41703246b8c
22c967ba0e1a0732
746f309e161ddf42
0654c4eb04deeb1c
d465443338975f8f
3cc6c77d2f5d27b6
2410cbfe1cbe5060
0c04fbe80bd3bcc0
a1111d841294f644
724c1be80c76ed40
a145890f56589d3b
a7b0a3d16b4ecfb0
ceb05e624c346f60
f55d13f51320d801
af3a32b322b7d4be
3308d2e72a0c2b58
79a2418b1f25d806
2dbeb6d720ad94f2
02c1c14b0217ee53
78e288eb40a72f86
b6d30942069ddb26
2dd939f90a62ccb1
45b9c751364a3ac9
58828a292fc5c122
b283f262a905f786
853a801b42abed9e
9d4cff2e9ccb4668
c19628c01ed3ce00
64bdd9485581df50
cabcb3258ddffd2c
e7ff395333f43f25
16536915092bfaf7
eebfe484d51ffeb4
b8ed635247bfaaea
214173540efde524
741a326616dc73a4
a023e3278e1897bd
e8f301b80190ecd0
60768ccd350f12c6
919da7155f0b0681
e11b80ad7126b8bf
cbf8d1c7a72587b8
f1ba57d552f03fc2
76b5539326c0f54f
a6bdfb7aa3cc4212
347319550531fe17
b8d0ddbca0141e40
d17fcc5da73d9563
a440ec9a97ce9080
b7b81f9c16b06740
369a3e060d3d09a4
e66563e559e81dc9
fb01167c160bf1b4
fa344f524d86e8a8
8975fa0c8643feb4
ca71eea9bcbbfec1
5205430a157b5852
e8f5b7e0a7553780
db140401036ddb14
593781352d07e3eb
1530098100cbd530
70de5790269cf900
8ce06be13b604ce0
c4aa4677362518c6
7cc9eb7572c8162d
074537e20197838a
cf23de17b3b590dd
10666dce070afeb4
ccc308fc072fdfd4
2c42887a1798a3a4
55c2afc33ae2fac6
c9b4ea7fb8c4e28c
23f7787610ee51da
260ffff4260efff4
843ae68b7715f2de
b93b84a95ffffdd3
d708ad8991c43788
b07a70ae4daee1f4
f21ce143d50acc3c
7e19943649036846
f2fbb066a76ff4ca
1605c20110b12605
38ae707d18e9f3f6
86d38f0b4b590719
4a48d4c63dbdecd0
ba958fc068c7f700
a38d2a121ae1982a
85d583a344d2e53f
d7f7e83fc3ef4fa9
8f5a41aa24c63f44
4fcbabda35928c66
6197f46c5d2f3fb4
d862debcbc4671b0
e6889c038c7d6f98
354f4df0103c3fa0
d9cc24221ebd7b98
f7eb8b72870c23a6
863345e024a3fb80
92af7f65490054db
3372693c1527e7b0
89301d410faecd30
80d0014300a385f0
9af060853a6aee70
071a89cf03d3c406
f82a0b400ae9f200
8419ead7792fe7bf
668c8b4337c9159c
cd12fd49cae8b722
90181f361193bc10
7db417dd0bb76b64
b0e42ab11d802124
10deee4a0fb503ec
89e9757c3f4b03b4
69edebb8618a0930
f4f5cce6c41077ce
ec6567765f8afdae
44eb3f0c10fafef4
79217e373bba9cc7
208056f50b0ba080
6f05e6a164059885
d0d2ef89c366fe62
e68aeb86d41bfd64
79fe8665400befb6
51341bce08d40968
31026b6614925514
9e2e078704a84ac2
ecde429d3da303c6
2124b3bd17480764
c77ffa2fc2f9cbb9
05d5091e003608f6
31b027d007bbcf00
3a2d030700b1eab3
afe148b931f83f51
5273b93e3bab265a
5af83e95163dbf18
9ea97fb24f24faa2
1ad97fea0d6c80c2
bb1b950d6cf17eff
1f6eda171ac70da2
82ae9f9f517c29d2
4024b7ba2e0aad48
329eb38c2381fef0
87c5e0f4774e83a4
6fd005f3029a0ff0
6030a20c3ce50640
69d4d33e57544968
87839da453747b94
28e389c61602ef5a
344add242d2c5650
a19d88b4564fcb64
a37237e523b0d182
879537571d5006a3
d9ec8afe76514d68
9c99962e5bdf8606
db5422ef1def6d2c
3b8fea31367d152f
bda3a0bd7714c5d7
cf7d58fc48206334
e7152e5e29dcdfb6
50dd9a6630c4e04e
50a3e40147d3a0a3
ec3a31d62dfde3c4
37d8c73f2b782e98
ff9431cd31b8eaa4
e33518cb1602d5c7
2249e3931e7caaeb
3d4521ee082087b6
ba0016901064c000
426e634d19c6cef6
18d66f4e0acefeb4
d508f0f1c8801988
6bef8b143aa60934
ca39b4708e8aeca0
2041335d067acd75
671ca0c440c1fca0
af6acc818c22996a
048b18970070e73d
337091e41d517640
aeb05b8a3e77d660
e94fd22bbf8b6b45
f7e75c7f5994b769
1d8bb46714d23cad
8174a27952297154
c21657ef42ad4dca
80b6ffa38087f702
af88d53c92377a40
3062cd8726da6676
120f7b6908b7ffb7
1b2e063800aa2aa0
0995c312074fd5ca
8d3a9d0556a11aa2
83cbe7b4774b13f4
91997b3446142624
25843087071e99ac
2f3d1d6d056f61f9
34332c280902ebb0
d718287421fdba00
fd84487847c67540
ed48ac459facac88
1862946c0e24df30
0fdb226b0222d729
f395ae53a5dfda4f
764a13dd092e0ef2
c3c418c212f03d88
53aa641020b5ab00
778a6d2b32fa582e
83e95ac52ec67f8d
6e1935c81723ef10
99d65f87396a461a
0364a24e02277ea8
b3760a7607581dd4
d82133442b4a1704
2e67686f12ef4c29
74365c0c29cb06b0
bd455ec546125f69
67c1ebff5fa629b7
31f39ad81e3901d0
2a4218440403a610
8337cad767fa9af1
03f252dd01494292
e4a715b71366e0e1
cd3cd787accc259c
b465e0299df6a935
dc58e8a3c83da7f8
