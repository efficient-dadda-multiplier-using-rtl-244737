0000000000000
fffffef9fbf91
4c220a9809981
242a060806080
0101000100010
ff0100ff00ff0
01ff02b702b70
8080400040000
aa5538b238b20
55aa38b238b20
52f24ea44ea40
2665105610560
a60c087008700
12d20fa40fa40
89180d300d300
5d95364136410
0ee80d600d600
81361ba61ba60
091600e600e60
6f6b2e252e250
113d04b504b50
178d0dcb0dcb0
6c0f062c062c0
d39077a077a00
1ff21dce1cce1
39a124b924b90
a0955d205d200
f20f0e960d961
9395563756370
650c057405740
f938373037300
0b8e06fa06fa0
db221db61db60
4a6b1f6e1f6e0
248a138813880
1e92113c113c0
4e8f2b922b920
d0ae8d608d600
2e1a046c046c0
949254a854a80
a3301fa01fa00
5f18095009500
8cb6646863681
1090090009000
0f9e090209020
347f1a0c1a0c0
ae885ce05ce00
6dc655ae55ae0
507724f024f00
95ec8ab48ab40
745c29e029e00
4c3f136c116c1
cb2e24ba24ba0
b2c78b468b460
3e14057005700
934c2d742d740
867e42b442b40
e0574ce04be01
ba7253b453b40
499b2c332c330
fa12123411341
1e830f420f420
6b2a11b611b60
c157426741671
26ee24b424b40
7d6b340f340f0
0af60aa40aa40
ab130d510c511
c38e6cba6cba0
92ca744474440
e0d1b6e0b6e00
50571af01af00
b1593e513e510
987f4b584b580
94cc76a076a00
741107b407b40
d71713b112b11
f145417541750
79b2544254420
aa100b000b000
0fbb0bf50af51
b34f37dd37dd0
a5935f4f5f4f0
feaead04ac041
d2725ea45ea40
48b7341833181
62e3576657660
ab583bd03bd00
05f005a005a00
765a2a0c2a0c0
2b9c1ad41ad40
1d7e0f460e461
0f37041903191
c449380438040
21bd19d519d50
3f6519db19db0
64ea5c085b081
df7f70f96df91
142a03c803c80
72662e342e340
8c4726ec26ec0
e2231f661e661
d16e5ab65ab60
dd8c79f479f40
47b432b432b40
6afc69b069b00
5bae3eda3eda0
e261566256620
f53b399737971
261503d603d60
2d26072e072e0
3ba828b028b00
3b03008100810
7cd4676067600
962e1bb41bb40
4348143014300
0125008500850
6b8839b039b00
5e9c39b039b00
90512d902d900
f3201f801f800
b0db967096700
83f37ca97ca90
9ea7685267521
adbd80797f791
0d7406a405a41
e6dec7f4c7f40
c7f3be75bc751
dfae981298120
cc8f726c716c1
6465280428040
6664293029300
1a7b0dde0dde0
a266425442540
0f3003a002a01
11fc12b412b40
357017a017a00
291c057405740
5799352735270
0d1a017201720
0091000000000
2689146614660
19f218c218c20
5d9d394939490
0612008c008c0
df352fcb2dcb1
9d603b803b800
26a2184c184c0
40f43d003d000
589a353035300
5d792cf52bf51
1f1d03c303c30
d97c69b469b40
fefaf90cf80c1
777a393639360
7b4f267526750
1524032403240
1abf13e613e60
57bd413b413b0
437a20d620d60
d4b1931492141
2984164416440
0534012401240
f3f3e709e6091
875c31f431f40
25b019a019a00
8bea7fb67fb60
06c2050c050c0
874c297429740
faa4a190a1900
dd1714c312c31
b2d897a097a00
4284221022100
5de8559055900
2a5b0f0e0f0e0
c5392c752b751
888a499049900
c780640064000
54a235a834a81
399c22f422f40
cfc9a2b7a2b70
fcc2bef8bef80
da312b1a2a1a1
ce3d32b630b61
d16653a653a60
bdcd97b997b90
3a330bbe0bbe0
847e416841680
5bbb42e942e90
07fd06fb06fb0
07ca067606760
477821d021d00
42310d820d820
b19a6b926b920
f45854c054c00
72ce5c545c540
efb9aeb7acb71
fc59575c575c0
f4f9ed54ed540
5d14076407640
381a063006300
3a781ca01ca00
325612b412b40
347b197c197c0
9ffc9d349c341
e69c8cb08cb00
d700000000000
7ae8702070200
a7583ad03ad00
cca482e082e00
15d5127912790
a91e147614760
e86359f858f81
c8b68ed08dd01
c03326c025c01
7ae36c7e6c7e0
2d6f140314030
caa2801480140
5516074e074e0
cdf2c42ac22a1
f8b8b300b3000
65762eae2eae0
66be4bb44bb40
f215140214020
b9281d901d900
2bfe2b2a2b2a0
2007016001600
2697171a171a0
e7776c216b211
cea7884286421
259c17f417f40
d3987ed07ed00
fa7976ca76ca0
a8ef9cd89cd80
59270d7f0d7f0
8c8c4ce04ce00
2105012501250
03cc033403340
f8b9b338b3380
a61a10ec10ec0
86bf653a643a1
ef23228520851
6ffc6df46cf41
df312c2f2a2f1
d3dfb92db82d1
3607025a025a0
40360d800d800
4a80250025000
3dc32f7f2f7f0
9653314231420
428b23e623e60
6bd559d759d70
210f027702770
e8bdab48ab480
5ae551a251a20
75a94dc54dc50
95d07a207a200
e784783478340
6bd3599158911
eae0ce00ce000
8021108010800
8826145014500
8682440c440c0
04df03ec03ec0
70c6572057200
2e9b1b921b920
01c6020602060
cc261ee81de81
2c2406e006e00
799e4af64af60
b91e15f615f60
8e0f089208920
53ae39da39da0
848745ac45ac0
8e7b463244321
c8c69ad09ad00
1be218b618b60
8f0e081208120
3f300ca00ba01
460a02ec02ec0
c519137513750
81733aa33aa30
8f07040904090
c2e4ae10ae100
e9100ea00ea00
7153248324830
9cf9985c975c1
819b4eb34eb30
83331aa91aa90
b146312631260
73823ae63ae60
88ce6dd06dd00
7a813d7a3d7a0
f13f3bd73ad71
b2855c825c820
e0e0c400c4000
f1ede005e0050
42ec3e303e300
8fe47fb47fb40
f13330832f831
d7725fce5fce0
236a0fb60fb60
1f640cb40cb40
7150242024200
12ab0d460d460
3d6d19f919f90
123604b404b40
ab4d347f347f0
c81f195817581
e5c6b26eb26e0
27f024a024a00
b7a476b476b40
a95d3d753d750
2440090009000
e2231f661e661
f77773b172b11
38bf29f829f80
f31817d017d00
65e2598a598a0
7c29145c145c0
fdaaa802a8020
d5392f752f750
29b41da41da40
6efe6e446d441
8367359d359d0
566b24b224b20
325b12c612c60
5117070707070
b85d435842581
045601a801a80
8d75423140311
70b44f404f400
0462018801880
54842b602b600
9f4b2f952f950
83f57db77db70
101c024002400
fcebe8bce6bc1
c93a2e322d321
f8e0d900d9000
1a15022202220
4345135713570
0ae70a660a660
c72e254224421
45c1354535450
21d11c411c410
6cd95b4c5b4c0
e9ad9df59df50
d1f2c6c2c6c20
42671b561b560
2689146614660
eb83790178011
927e49d449d40
b3533ac93ac90
1647069a069a0
0ecc0bf00bf00
b02e202020200
6ce5612c612c0
1244055005500
f004044004400
a2160e940e940
cd42351a351a0
159b0df70df70
db3830d030d00
1143053305330
dc1f1bbc19bc1
740200e800e80
56fe55d455d40
8d6a3aa23aa20
edead8a2d8a20
449f2a6c2a6c0
210b017301730
86b560365f361
3df03aa039a01
1cf81c401b401
29430b7b0b7b0
0c2e026802680
33ee2fda2fda0
4fa0328032800
4e87294229420
c234289028900
4a72219421940
80ac560056000
2d450d710d710
58cd471847180
04fe046804680
4009024002400
0304001400140
bb815ebb5ebb0
8dfa8ab289b21
3083187018700
793e1e561d561
ef726c6e6a6e1
1ba813b013b00
d1a6882688260
6ea8486048600
7e8b446244620
d5e3bdbfbcbf1
64f8614061400
814e281628160
b037263026300
fb3a38e638e60
5732124e114e1
d5e1bb95bb950
b4ba834883480
a223166616660
67fd665b665b0
58fb563856380
0dd60b7e0b7e0
2103006300630
12a00c000c000
bde1a6bda6bd0
416e1c961c960
290e02e602e60
15aa0eb20eb20
d761519751970
de816fde6fde0
abf8a5d0a5d00
48992b082b080
3eb12bbe2abe1
4b0b033903390
752f165b155b1
28440b400b400
7200000000000
435d19d719d70
f65451f051f00
f8fcf440f4400
8c522d182d180
3e0802e002e00
f7e1da37d9371
4f37129910991
5b2e10da10da0
0055000000000
6115088508850
794721bf21bf0
80a7538053800
333f0d0d0d0d0
81c6650665060
0117002700270
43d137a337a30
1624037003700
66963bf43bf40
0a64055005500
054c027402740
4da1308d308d0
3b15055705570
95f58eb98eb90
87da73d673d60
c0271dc01cc01
a8e4964096400
b7c8907090700
e198863086300
63c34b694b690
53b83dd03dd00
fc7e7d687b681
26480b600b600
b99e72f672f60
a42517c417c40
0bd309b109b10
d5b798a397a31
e48374ec73ec1
a06d442044200
bbb382e182e10
cf8168cf68cf0
23e820b020b00
86c0650065000
819149a149a10
d5d0ae20ae200
cd04036403640
d3af921d911d1
95cc78b478b40
e4b6a228a2280
aef4a7b0a6b01
b1a4728472840
3a15054205420
070a007600760
22a3166616660
5cf558ac57ac1
1a600b000b000
d573614f5f4f1
8e0c06f006f00
a004030003000
a088550055000
ae3e2b442a441
7d43207f207f0
0074000000000
cc110e0c0d0c1
bfeeb192b1920
80e5728072800
89170cef0bef1
a886589058900
10be0c600c600
bc79595c585c1
40cf33c033c00
13d811d011d00
433c10d410d40
bac18cba8cba0
343b0c7c0c7c0
bda67bce7bce0
f975720d720d0
7ed86aa06aa00
6113070307030
7ae9708a708a0
af49327732770
c40b090c080c1
9da1631d631d0
a432200820080
13990ce30ce30
25540d240d240
41a62b062b060
beb1853e833e1
4d9f2f932f930
912213a213a20
037b02d902d90
0f7c07f406f41
44f8424042400
ac19114c104c1
b13726c726c70
ac7d546c536c1
4ab5349234920
844925c425c40
767736da36da0
77c45c745c740
1efe1f441e441
e48c7d607d600
334f105d105d0
fa15148214820
ef7972b770b71
044a014801480
7513088f088f0
d18169d169d10
f7fef5a2f4a21
73fe725a725a0
44631acc19cc1
35ea31b231b20
f2eee1d4e1d40
351303cf03cf0
94170d4c0d4c0
24bf1b6c1b6c0
8643239223920
f35c58d458d40
219a147214720
d1a1841184110
8247249624960
e31c19d419d40
b45d416441640
3b7f1d151d150
e5e0c980c9800
7c64312031200
0628016001600
00f3000000000
7dae54f654f60
73672ecd2ecd0
4dba393237321
246a0f080f080
5860210021000
501e096009600
d75447b447b40
0053000000000
c056408040800
d665547654760
1ef01d801c801
ed322f6a2d6a1
b603020202020
e6bda9d6a9d60
4a40130013000
5f10062006200
646326ec25ec1
ffdedda2dca21
96130b420b420
5cec556055600
6dc1536d536d0
46da3c2c3c2c0
0c47036c036c0
1a0d01f201f20
d5a98ca58ca50
49a22f122f120
ef2623ba23ba0
3ff83dd03cd01
446f1e2c1d2c1
8250298029800
30c5257025700
5fc84b704b700
f46d682467241
e20706f605f61
cfc29d1e9d1e0
a166418641860
e9e0cd80cd800
f08d83f083f00
8c341d601c601
b8140f000f000
0cee0b680b680
bb694dd34dd30
739d472747270
c0231ac019c01
a4de8ee88ee80
497c23b423b40
0ce90b4c0b4c0
ed8c82f482f40
202b056005600
786a31b031b00
57481a701a700
4c41134c134c0
bdbd8cc98ac91
f9a7a3bfa2bf1
42671b561b560
a73d281b281b0
4d7b267f247f1
8eab5ff25ef21
641e0be80be80
2aa41c501c500
2913030b030b0
35801b001b000
e7cfbbc9bac91
7f8c45f445f40
387318f818f80
e8554d084d080
ffc2c17ec17e0
736d321732170
238c143414340
313e0cd60cd60
172c04b404b40
578e30c230c20
175108a708a70
3d5e168616860
42cf35f635f60
91331d431d430
e305047704770
bfdea5a2a5a20
6962289228920
69be4df64df60
86351d361c361
60451a601a600
56c0410041000
0f7f080907091
4793297529750
f75c59f459f40
20af166016600
8087438043800
a1ca805280520
