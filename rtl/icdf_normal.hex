1ed99b5c626692a452
1eec3bc398e79148ad
1efd818b4fc4102ded
1f0dad42b1bc8f43dd
1f1cef661fa48e7f5e
1f2b6d63e0eb0dd889
1f3944ce793a0d4999
1f468d7ab39b0cce3f
1e775af3b2cd8f861d
1e86dd7b7b928e3fcf
1e951aa680470d34c3
1ea24d68ad7f8c5605
1eaea1de756a0b994f
1eba39f027078af755
1ec5304535ac0a6ac5
1ecf9a37c88289efa1
1e23396411c08d861e
1e30bc30ebb20c57b3
1e3d11732c270b6026
1e486fbeec3d8a918d
1e52ffdbd69b09e260
1e5ce1179f3c094bd9
1e662c05210a08c909
1e6ef44cfb9108563e
1dd8af913a758c1c7a
1de4c8f168ac0b033d
1defc9e6e3f78a1d37
1df9e563cb26895d61
1e03416e51c388bad0
1e0bfb2f12b6082f30
1e1429844a9d07b5e4
1e1bdeb51990874b7a
1d952d7bce668b0ca6
1da03737ead68a057c
1daa3a906981092e75
1db367665150887b49
1dbbe16d66c507e392
1dc3c4006b1a87615c
1dcb248efe4986f051
1dd21437ee47868d34
1d57175e82aa0a3743
1d614be050e2093f7f
1d6a895969e208753a
1d72fd0c18cc07ccd4
1d7ac8b123b6073e59
1d820619fcea06c426
1d88c97e815e065a21
1d8f2301d75005fd3c
1d1d57a73307898a4b
1d26df53fdbb089fbd
1d2f7d25624587e068
1d375c1a381d07413b
1d3e9c35f7c506baa5
1d4555f752b286474a
1d4b9c89fd2d85e344
1d517f38ecc8858bad
1ce72931022208fa97
1cf02147f3cd081b7c
1cf83aeeaf5a07659e
1cff9f2a3bf586ce69
1d066c80e5e3064ea2
1d0cba4a7e1a85e12d
1d129ac995e2058252
1d181c8d65d3852f4b
1cb3fa3fe2488880d8
1cbc78b2feac87abc2
1cc422b3fc3c86fe29
1ccb1f8a2737066de8
1cd18c6c584c05f412
1cd77faf2f7e058bc0
1cdd0ac88cf5053162
1ce23ba3009284e252
1c835ba2864788180e
1c8b7163cd26874bd1
1c92bb861d1306a584
1c995fc49d84061b63
1c9f7a2c5f8685a6c6
1ca5202c2df70542f8
1caa6284967104ec8c
1caf4e8e6ff684a0f6
1c54f64e566507bcac
1c5cb0c2f8a686f851
1c63a77468c6065880
1c69febb095205d3d1
1c6fd19985f20563d7
1c7534b140cb050409
1c7a3820df4704b11c
1c7ee8bf363f84689a
1c2884aa8083076c18
1c2fee9ee64206aecf
1c369bdcf5fe0614ce
1c3caf7d2e1c8594ff
1c4243923fd605292b
1c476c04acac04ccf1
1c4c38617f0d047d22
1c50b50ab75904375f
1bfdce106963872460
1c04f05e5caa066d7a
1c0b5c54098985d8b8
1c1133e7b890055d4d
1c169052941504f535
1c1b84d5aa78049c34
1c20207a3d7b044f33
1c246f38a271840be9
1bd4a3ae181d86e405
1bdb85b155ea0632ec
1be1b7254fe585a2ee
1be758f79327052b7e
1bec839b02dd84c6ca
1bf149b827150470b3
1bf5b9e04bf704263c
1bf9dfaba5ff83e52e
1bacde4e7f7486a9dd
1bb38638990305fe11
1bb982dc421f05726b
1bbef43457c104fe9e
1bc3f1fe18c9049d00
1bc88e5669c3044991
1bccd760d44e84016a
1bd0d85da4c603c264
1b865cbbc7210674fc
1b8ccfd1d63685ce0c
1b929c7b2e00054664
1b97e1d3319904d5eb
1b9cb6eff771047721
1ba12d6df5f4042621
1ba5530bd16403e018
1ba932b911a283a2ed
1b61028b92ae8644a2
1b6745547fd785a22f
1b6ce629729d051e32
1b7203572f0404b0cb
1b76b35954f304549b
1b7b0755bd880405d7
1b7f0cade94783c1c1
1b82ce06d9b703864b
1b3cb735f78d861835
1b42cd9dc65e0579e9
1b484635208e04f952
1b4d3e890b72048ec1
1b51cc85e2728434f8
1b5600e387a503e846
1b59e8ad2c4803a5fb
1b5d8e42c9cb836c19
1b1965622d4c05ef36
1b1f52d552040554c4
1b24a650357c84d755
1b297cad5287046f66
1b2deb53add98417d8
1b320294dce103cd10
1b35cf2bce18038c6f
1b395b384f88035403
1af6fa5a9c0785c939
1afcc1db7045053260
1b01f2f9455e04b7e1
1b06a9e7d32a845265
1b0afb91a1a383fceb
1b0ef7e8cdc983b3eb
1b12ab5d66080374d6
1b161fd36093833dc6
1ad5659e3e1c05a5e7
1adb09d60cf2051269
1ae01b04530c049aa9
1ae4b4c0943e843777
1ae8eb80c97983e3ed
1aecceddb45b039c97
1af06b0154c3035ef4
1af3c997a77a832928
1ab498882d270584f3
1aba1bd4e4db84f49b
1abf0f3be124047f6e
1ac38dc1f32d841e61
1ac7ab6fa70a03cca7
1acb7789e2390386e0
1acefdf8eaa9034a97
1ad248343d650315fb
1a9486082b5505661d
1a99ea8779e304d8bb
1a9ec2147da18465f9
1aa32729eca58406ef
1aa72d6957e083b6ea
1aaae3c8bf5c837299
1aae55f29795033795
1ab18d2d0068830414
1a75226858e005492e
1a7a6a00c51704be96
1a7f276e9467044e1b
1a8374aa2d7b83f0f6
1a8764f3fe2f03a28b
1a8b06f7a0ce835f9a
1a8e662542d20325c8
1a918b947db882f353
1a56631d3df5852df7
1a5b8f85aaa704a601
1a6034636a028437ab
1a646b33ac5a03dc50
1a6846db0de9838f69
1a6bd5bedae1034dc4
1a6f231831e2031511
1a7237d2baa282e399
1a383e9e037d85144d
1a3d5163efb2048ed5
1a41df1ae5e9842287
1a4600cb5bf283c8dd
1a49c902f77c037d64
1a4d45e472bd033cf9
1a508274cd64830556
1a53877617d182d4cc
1a1aac4336fc84fc0d
1a1fa6cffaf08478f1
1a241ea86300840e91
1a282c661b4c03b681
1a2be2444571836c62
1a2f4e267506832d21
1a327ae03ae382f680
1a35710c373502c6d7
19fda42ad58284e517
1a0287c80dd3046439
1a06eaed269b03fbad
1a0ae5ca77bf83a522
1a0e8a4cb486035c4d
1a11e61b6d95831e25
1a1503db3c8682e878
1a17ec014b0702b9a5
19e11f20a10f84cf4f
19e5ecfbeebf045093
19ea3c7f6c9283e9c4
19ee257725bf8394ab
19f1b9852248834d0f
19f50617d3db830ff3
19f815a7221a82db2e
19faf084918382ad27
19c51689f9a904ba9c
19c9cfb8358a843de8
19ce0c9531f983d8c1
19d1e48d52c0838509
19d568fb6de2833e96
19d8a7178112830279
19dba92eda6282ce92
19de7771065d02a14c
19a984549c7504a6e9
19ae29d4964a842c25
19b254f214b103c892
19b61cbe212183762a
19b9924f96ac8330d3
19bcc2aa770002f5a9
19bfb7f366c802c295
19c27a39878d829607
198e62e7cac6049420
1992f5a4a794841b36
19970fd7c08103b926
199ac83ac2710367ff
199e2fa389030323b7
19a152e463f082e976
19a43bfb1a7e82b72a
19a6f2d7d322828b4c
1973ad177380048231
19782deabae0040b0d
197c37f87ce603aa6e
197fe1a6c007835a7a
19833b8d2632831736
1986524e6dd682ddd2
19892fc32c3982ac47
198bdbbde280828111
19595e190c7904710d
195dcdcc71ad83fb9b
1961c86b8385839c5e
1965640c174e034d90
1968b10a2a6d830b44
196bbbdae53e82d2b4
196e8e3338f702a1e1
19712fc93f8b82774c
193f7179d88a8460a4
1943d0c8c9e683ecd2
1947bca2d782038ee9
194b4ad0dff6034135
194e8b75a52602ffd6
19518ada929e02c813
1954529268b48297f0
1956ea3802e1026df5
1925e316631d8450e9
192a32af685403dea8
192e106262e9838204
193191ae3fa803355f
1934c67ec5da82f4e4
1937baf35e9c82bde4
193a787df44e028e6a
193d069f3922026503
190caf1303838441d2
1910ef98f21083d111
1914bfb829b10375a6
191834a8796f832a05
191b5e20ca4e82ea66
191e4818213582b421
1920fbe0d75282854a
192380e2790b825c71
18f3d1d5423d043353
18f803e04dd803c404
18fbc6f56a0e8369c6
18ff3007ef94031f1e
19024e9be40282e053
19052e816c9202aac2
1907d8ec81c6827c87
190a552c7d84025437
18db47fe0083842562
18df6c1cac9983b778
18e322a888a9835e5c
18e68052f58e8314a5
18e9946ef1bb02d6a4
18ec6aa72fad02a1c1
18ef0c12654702741c
18f17fe89e5c024c50
18c30e64478e0417f8
18c7251c3df083ab65
18cacf97ac8f035360
18ce22485557830a91
18d12c51efb882cd53
18d3f93b12d0829918
18d691fe3eeb826c04
18d8fdbd08a50244b6
18ab2210a92e840b0b
18af2bdf7987039fc3
18b2cabbf3488348cc
18b612da6fd68300dc
18b9133105e202c45b
18bbd72374a58290c2
18be67910445026439
18c0cb859c7d823d65
189380391ee003fe94
18977d94e9dd83948c
189b113d2925833e99
189e4f2ae41402f781
18a146281f1102bbb7
18a40176f2a20288b9
18a689dc5dce825cb7
18a8e64f5a4d823658
187c263d572303f28d
1880179567fa0389ba
1883a06df4b68334c2
1886d486abc902ee7b
1889c27ef7c602b360
188c75786ac50280f8
188ef61e9c7b825579
18914b544cd1822f8c
186511a3637b83e6ef
1868f760b9de037f46
186c75c86719032b42
186fa0629e9702e5c4
187285a5953802ab53
18753093674f82797d
1877a9bf1ac5024e7b
1879f7f7e0190228fc
184e4014bb4203dbb4
18521a9a87b483752d
18558eeae4af032213
1858b0584f4602dd58
185b8d3117ea82a38c
185e3058e760027243
1860a24afbe80247ba
1862e9c397f08222a5
1837af5b893483d0d7
183b7f079d59836b68
183ee9955ba8831932
18420223382b02d534
1844d6d8deb1029c07
1847727c7932026b45
1849dd723deb824133
184c1e641a1e021c85
18215d603b0d83c653
1825228b6f4b8361f3
182883a6bf4083109a
182b939e2d7882cd53
182e6073f0ad8294c0
1830f4d19c5c826482
183359051496823ae2
183593a68280021697
180b48274b9403bc23
180f0325db4c0358ca
18125b1abfc1830847
181562c10d5282c5b1
181827f6a611828db4
181ab54963b6025df6
181d12f184e38234c4
181f4775f86e0210da
17f56dcf40a083b244
17f91ef11e00834fea
17fc6e07b87f030036
17ff6d9ea6bf82be4c
18022b7088830286e0
1804b1f04fa482579e
18070941399a022ed7
180937d97def020b4b
17dfcc8ed75903a8b0
17e3741ff7b283474e
17e6ba9ccdc802f863
17e9b262d15502b721
17ec690a64fd828041
17eee8ec5a8e025178
17f13a178aac822919
17f362f1f24b0205e7
17ca62b359b5839f65
17ce00fbfb28833ef4
17d13f2035a482f0cc
17d42f50b05f02b02c
17d6df0489c58279d5
17d9587b31fc024b80
17dba3afb1ce822386
17ddc6f8425f8200ad
17b52e9f18e983965f
17b8c3e402130336d7
17bbf9eda6d602e96e
17bee2c11cdb82a96b
17c18bb52bc4027399
17c3fef097a00245b6
17c6445b276d821e1e
17c8623bc1c481fb9a
17a02ec808e6838d9a
17a3bb4ac330032ef6
17a6e974ea1502e245
17a9cb21323d02a2dc
17ac6d86ef20826d8b
17aedab4e60e824016
17b11a8023ca8218dd
17b33320a87b01f6ad
178b61b67994038514
178ee5b586b203274d
17920c388a1682db50
1794e6f0fa66829c7b
179782f78f7e0267a8
1799ea43b580823a9e
179c249840790213c2
179e381eb15c01f1e3
1f535af2ac358c6331
1f5fbd7b0a6b8c05e6
1f6bc2cf770f0bb45c
1f7776ad88110b6cff
1f82e33d24030b2e86
1f8e116053d90af7ea
1f9908f1489e8ac852
1fa3d0f3492a8a9f10
1fae6e2fd79b8541e7
1fb3b00e124d8539b6
1fb8e9bbea6e85322c
1fbe1bdfbdad852b42
1fc34719f1128524f3
1fc86c058b4e051f3b
1fcd8b38c3ab051a14
1fd2a545870b85157c
1fd7ba8c6e37028931
1fda43bc2bef02883e
1fdccbf999ca02875d
1fdf53559d3682868c
1fe1d9e0f3868285cc
1fe45fac351682851c
1fe6e4c7d86602847d
1fe96944351e0283ee
1febed31870c02836f
1fee709ff10c028300
1ff0f39f7fed8282a2
1ff376402d46028253
1ff5f891e244828213
1ff87aa47a768281e4
1ffafc87c6878281c5
1ffd7e4b8f010281b5
