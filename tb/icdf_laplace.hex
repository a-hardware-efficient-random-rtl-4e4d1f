1fa7556f89d6078933
1faedc46a42a06bdd4
1fb59862d2ca861944
1fbbb05d14b685915f
1fc140bdbe73851f3f
1fc65f34c79a04be0c
1fcb1ca0d927046a44
1fcf86636a1984214f
1f7af8e98be1878933
1f827fc0a63586bdd4
1f893bdcd4d6061944
1f8f53d716c205915f
1f94e437c07f051f3f
1f9a02aec9a584be0c
1f9ec01adb32846a44
1fa329dd6c2504214f
1f4e9c638ded078933
1f56233aa84106bdd4
1f5cdf56d6e1861944
1f62f75118cd85915f
1f6887b1c28a851f3f
1f6da628cbb104be0c
1f726394dd3e046a44
1f76cd576e3084214f
1f223fdd8ff8878933
1f29c6b4aa4c86bdd4
1f3082d0d8ed061944
1f369acb1ad905915f
1f3c2b2bc496051f3f
1f4149a2cdbc84be0c
1f46070edf49846a44
1f4a70d1703c04214f
1ef5e3579204078933
1efd6a2eac5806bdd4
1f04264adaf8861944
1f0a3e451ce485915f
1f0fcea5c6a1851f3f
1f14ed1ccfc804be0c
1f19aa88e155046a44
1f1e144b724804214f
1ec986d1940f878933
1ed10da8ae6386bdd4
1ed7c9c4dd04861944
1edde1bf1ef005915f
1ee3721fc8ad051f3f
1ee89096d1d384be0c
1eed4e02e360846a44
1ef1b7c5745384214f
1e9d2a4b961b078933
1ea4b122b06f06bdd4
1eab6d3edf10061944
1eb1853920fb85915f
1eb71599cab8851f3f
1ebc3410d3df04be0c
1ec0f17ce56c846a44
1ec55b3f765f04214f
1e70cdc59826878933
1e78549cb27b06bdd4
1e7f10b8e11b861944
1e8528b3230705915f
1e8ab913ccc4051f3f
1e8fd78ad5ea84be0c
1e9494f6e778046a44
1e98feb9786a84214f
1e44713f9a32878933
1e4bf816b48686bdd4
1e52b432e327061944
1e58cc2d251285915f
1e5e5c8dcecf851f3f
1e637b04d7f684be0c
1e683870e983846a44
1e6ca2337a7604214f
1e1814b99c3e078933
1e1f9b90b69206bdd4
1e2657ace532861944
1e2c6fa7271e85915f
1e320007d0db051f3f
1e371e7eda0204be0c
1e3bdbeaeb8f046a44
1e4045ad7c8184214f
1debb8339e49878933
1df33f0ab89d86bdd4
1df9fb26e73e061944
1e001321292a05915f
1e05a381d2e7051f3f
1e0ac1f8dc0d84be0c
1e0f7f64ed9a846a44
1e13e9277e8d04214f
1dbf5bada055078933
1dc6e284baa906bdd4
1dcd9ea0e949861944
1dd3b69b2b3585915f
1dd946fbd4f2851f3f
1dde6572de1904be0c
1de322deefa6046a44
1de78ca1809884214f
1d92ff27a260878933
1d9a85febcb486bdd4
1da1421aeb55061944
1da75a152d4105915f
1dacea75d6fe051f3f
1db208ece02484be0c
1db6c658f1b1846a44
1dbb301b82a404214f
1d66a2a1a46c078933
1d6e2978bec006bdd4
1d74e594ed60861944
1d7afd8f2f4c85915f
1d808defd909851f3f
1d85ac66e23004be0c
1d8a69d2f3bd046a44
1d8ed39584af84214f
1d3a461ba677878933
1d41ccf2c0cb86bdd4
1d48890eef6c061944
1d4ea109315805915f
1d543169db15051f3f
1d594fe0e43b84be0c
1d5e0d4cf5c8846a44
1d62770f86bb84214f
1d0de995a883078933
1d15706cc2d706bdd4
1d1c2c88f178061944
1d224483336385915f
1d27d4e3dd20851f3f
1d2cf35ae64704be0c
1d31b0c6f7d4046a44
1d361a8988c704214f
1ce18d0faa8e878933
1ce913e6c4e286bdd4
1cefd002f383861944
1cf5e7fd356f05915f
1cfb785ddf2c051f3f
1d0096d4e85284be0c
1d055440f9e0046a44
1d09be038ad284214f
1cb53089ac9a078933
1cbcb760c6ee86bdd4
1cc3737cf58f061944
1cc98b77377a85915f
1ccf1bd7e137851f3f
1cd43a4eea5e04be0c
1cd8f7bafbeb846a44
1cdd617d8cde04214f
1c88d403aea5878933
1c905adac8fa06bdd4
1c9716f6f79a861944
1c9d2ef1398605915f
1ca2bf51e343051f3f
1ca7ddc8ec6a04be0c
1cac9b34fdf7046a44
1cb104f78ee984214f
1c5c777db0b1878933
1c63fe54cb0586bdd4
1c6aba70f9a6061944
1c70d26b3b9205915f
1c7662cbe54e851f3f
1c7b8142ee7584be0c
1c803eaf0002846a44
1c84a87190f504214f
1c301af7b2bd078933
1c37a1cecd1106bdd4
1c3e5deafbb1861944
1c4475e53d9d85915f
1c4a0645e75a051f3f
1c4f24bcf08104be0c
1c53e229020e046a44
1c584beb930084214f
1c03be71b4c8878933
1c0b4548cf1c86bdd4
1c120164fdbd061944
1c18195f3fa905915f
1c1da9bfe966051f3f
1c22c836f28c84be0c
1c2785a30419846a44
1c2bef65950c04214f
1bd761ebb6d4078933
1bdee8c2d12806bdd4
1be5a4deffc8861944
1bebbcd941b485915f
1bf14d39eb71851f3f
1bf66bb0f49804be0c
1bfb291d0625046a44
1bff92df971784214f
1bab0565b8df878933
1bb28c3cd33386bdd4
1bb9485901d4061944
1bbf605343c005915f
1bc4f0b3ed7d051f3f
1bca0f2af6a384be0c
1bcecc970830846a44
1bd33659992304214f
1b7ea8dfbaeb078933
1b862fb6d53f06bdd4
1b8cebd303df861944
1b9303cd45cb85915f
1b98942def88851f3f
1b9db2a4f8af04be0c
1ba270110a3c046a44
1ba6d9d39b2e84214f
1b524c59bcf6878933
1b59d330d74a86bdd4
1b608f4d05eb061944
1b66a74747d705915f
1b6c37a7f194051f3f
1b71561efaba84be0c
1b76138b0c47846a44
1b7a7d4d9d3a84214f
1b25efd3bf02078933
1b2d76aad95606bdd4
1b3432c707f7061944
1b3a4ac149e285915f
1b3fdb21f39f851f3f
1b44f998fcc604be0c
1b49b7050e53046a44
1b4e20c79f4604214f
1af9934dc10d878933
1b011a24db6186bdd4
1b07d6410a02861944
1b0dee3b4bee05915f
1b137e9bf5ab051f3f
1b189d12fed184be0c
1b1d5a7f105f046a44
1b21c441a15184214f
1acd36c7c319078933
1ad4bd9edd6d86bdd4
1adb79bb0c0e061944
1ae191b54df985915f
1ae72215f7b6851f3f
1aec408d00dd04be0c
1af0fdf9126a846a44
1af567bba35d04214f
1aa0da41c525078933
1aa86118df7906bdd4
1aaf1d350e19861944
1ab5352f500505915f
1abac58ff9c2051f3f
1abfe40702e904be0c
1ac4a1731476046a44
1ac90b35a56884214f
1a747dbbc730878933
1a7c0492e18486bdd4
1a82c0af1025061944
1a88d8a9521105915f
1a8e6909fbcd851f3f
1a93878104f484be0c
1a9844ed1681846a44
1a9caeafa77404214f
1a482135c93c078933
1a4fa80ce39006bdd4
1a5664291230861944
1a5c7c23541c85915f
1a620c83fdd9851f3f
1a672afb070004be0c
1a6be867188d046a44
1a705229a97f84214f
1a1bc4afcb47878933
1a234b86e59b86bdd4
1a2a07a3143c061944
1a301f9d562805915f
1a35affdffe5051f3f
1a3ace75090b84be0c
1a3f8be11a98846a44
1a43f5a3ab8b04214f
19ef6829cd53078933
19f6ef00e7a706bdd4
19fdab1d1647861944
1a03c317583385915f
1a09537801f0851f3f
1a0e71ef0b1704be0c
1a132f5b1ca4046a44
1a17991dad9684214f
19c30ba3cf5e878933
19ca927ae9b286bdd4
19d14e971853061944
19d766915a3f05915f
19dcf6f203fc051f3f
19e215690d2284be0c
19e6d2d51eaf846a44
19eb3c97afa204214f
1996af1dd16a078933
199e35f4ebbe06bdd4
19a4f2111a5e861944
19ab0a0b5c4a85915f
19b09a6c0607851f3f
19b5b8e30f2e04be0c
19ba764f20bb046a44
19bee011b1ae04214f
196a5297d375878933
1971d96eedc986bdd4
1978958b1c6a861944
197ead855e5605915f
19843de60813051f3f
19895c5d113984be0c
198e19c922c6846a44
1992838bb3b984214f
193df611d581078933
19457ce8efd506bdd4
194c39051e76061944
195250ff606185915f
1957e1600a1e851f3f
195cffd7134504be0c
1961bd4324d2846a44
19662705b5c504214f
1911998bd78c878933
19192062f1e106bdd4
191fdc7f2081861944
1925f479626d05915f
192b84da0c2a051f3f
1930a351155084be0c
193560bd26de046a44
1939ca7fb7d084214f
18e53d05d998078933
18ecc3dcf3ec86bdd4
18f37ff9228d061944
18f997f3647885915f
18ff28540e35851f3f
190446cb175c84be0c
1909043728e9846a44
190d6df9b9dc04214f
18b8e07fdba4078933
18c06756f5f806bdd4
18c723732498861944
18cd3b6d668485915f
18d2cbce1041051f3f
18d7ea45196804be0c
18dca7b12af5046a44
18e11173bbe784214f
188c83f9ddaf878933
18940ad0f80386bdd4
189ac6ed26a4061944
18a0dee7689005915f
18a66f48124c851f3f
18ab8dbf1b7384be0c
18b04b2b2d00846a44
18b4b4edbdf304214f
18602773dfbb078933
1867ae4afa0f06bdd4
186e6a6728af861944
187482616a9b85915f
187a12c21458851f3f
187f31391d7f04be0c
1883eea52f0c046a44
18885867bffe84214f
1833caede1c6878933
183b51c4fc1a86bdd4
18420de12abb061944
184825db6ca705915f
184db63c1664051f3f
1852d4b31f8a84be0c
1857921f3117846a44
185bfbe1c20a04214f
18076e67e3d2078933
180ef53efe2606bdd4
1815b15b2cc6861944
181bc9556eb285915f
182159b6186f851f3f
1826782d219604be0c
182b35993323046a44
182f9f5bc41584214f
17db11e1e5dd878933
17e298b9003186bdd4
17e954d52ed2061944
17ef6ccf70be05915f
17f4fd301a7b051f3f
17fa1ba723a184be0c
17fed913352e846a44
180342d5c62104214f
17aeb55be7e9078933
17b63c33023d06bdd4
17bcf84f30dd861944
17c3104972c985915f
17c8a0aa1c86851f3f
17cdbf2125ad04be0c
17d27c8d373a046a44
17d6e64fc82d04214f
178258d5e9f4878933
1789dfad044886bdd4
17909bc932e9861944
1796b3c374d505915f
179c44241e92051f3f
17a1629b27b884be0c
17a620073945846a44
17aa89c9ca3884214f
1755fc4fec00078933
175d8327065406bdd4
17643f4334f5061944
176a573d76e085915f
176fe79e209d851f3f
1775061529c404be0c
1779c3813b51846a44
177e2d43cc4404214f
17299fc9ee0b878933
173126a1086006bdd4
1737e2bd3700861944
173dfab778ec05915f
17438b1822a9051f3f
1748a98f2bcf84be0c
174d66fb3d5d046a44
1751d0bdce4f84214f
16fd4343f017878933
1704ca1b0a6b86bdd4
170b8637390c061944
17119e317af785915f
17172e9224b4851f3f
171c4d092ddb84be0c
17210a753f68846a44
17257437d05b04214f
16d0e6bdf223078933
16d86d950c7706bdd4
16df29b13b17861944
16e541ab7d0385915f
16ead20c26c0051f3f
16eff0832fe704be0c
16f4adef4174046a44
16f917b1d26684214f
16a48a37f42e878933
16ac110f0e8286bdd4
16b2cd2b3d23061944
16b8e5257f0f05915f
16be758628cc051f3f
16c393fd31f284be0c
16c85169437f846a44
16ccbb2bd47204214f
16782db1f63a078933
167fb489108e06bdd4
168670a53f2e861944
168c889f811a85915f
169219002ad7851f3f
1697377733fe04be0c
169bf4e3458b046a44
16a05ea5d67d84214f
1fd3a7472cbf03e133
1fd78820ad6703a86b
1fdb3041103a8375c9
1fdea5c9ce6a034858
1fe1edeafc2c831f57
1fe50d125f7e82fa26
1fe8070f942c02d845
1feadf30285a82b945
1fed970dc4630151d3
1feee8dcd865014b00
1ff033d8ecbd014472
1ff1784730cd013e25
1ff2b668cc4c013815
1ff3ee7b2ddc013240
1ff520b8524c812ca1
1ff64d570551812737
1ff7744d7d458091a3
1ff805f012a780905a
1ff8964a2d71008f18
1ff925618a74008dda
1ff9b33bc05b808ca3
1ffa3fde40fb008b70
1ffacb4e5a8f808a43
1ffb559138f480891b
1ffbdeabe6c80087f8
1ffc66a34e878086d9
1ffced7c3b9d0085bf
1ffd733b5b648084aa
1ffdf7e53e23008399
1ffe7b7e57f700828d
1ffefe0b01be808185
1fff7f8f79f3808081
