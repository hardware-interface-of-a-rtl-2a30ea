// Expected hash values of the generated test messages. Message k of a
// function has bit length LEN[k]; its words come from the 32-bit LCG
// x <- x*1664525 + 1013904223 seeded with k+1 (two steps, high word first,
// per 64-bit word). Values computed with an independent software model.
localparam int N_SHA1 = 13;
localparam int LEN_SHA1 [13] = '{0, 1, 24, 31, 32, 440, 447, 448, 480, 511, 512, 1000, 1535};
localparam logic [31:0] DIG_SHA1 [13][8] = '{
  '{32'hda39a3ee, 32'h5e6b4b0d, 32'h3255bfef, 32'h95601890, 32'hafd80709, 32'h00000000, 32'h00000000, 32'h00000000},
  '{32'hbb6b3e18, 32'hf0115b57, 32'h92524167, 32'h6f5b1ae8, 32'h8747b08a, 32'h00000000, 32'h00000000, 32'h00000000},
  '{32'hddf2fd59, 32'h8d6cd91e, 32'h91316ad3, 32'h0878d9eb, 32'h39535823, 32'h00000000, 32'h00000000, 32'h00000000},
  '{32'haafcc97e, 32'haab23eb3, 32'h4d8a61ac, 32'ha8cf05ce, 32'h06541a6c, 32'h00000000, 32'h00000000, 32'h00000000},
  '{32'h799c0d49, 32'h19dd0941, 32'hc914d813, 32'h40764cbb, 32'h95e8b91c, 32'h00000000, 32'h00000000, 32'h00000000},
  '{32'h528f1b3e, 32'hd1e0a958, 32'h335265ee, 32'h0d98b104, 32'he128b82a, 32'h00000000, 32'h00000000, 32'h00000000},
  '{32'h82ee1dd1, 32'h5d1b8231, 32'h5d9deea7, 32'h3a25ab19, 32'h30c8ec3d, 32'h00000000, 32'h00000000, 32'h00000000},
  '{32'h747ca767, 32'h683b5642, 32'h0a0852d3, 32'hb5b8f072, 32'h41f7f000, 32'h00000000, 32'h00000000, 32'h00000000},
  '{32'hec74db02, 32'h95e62a18, 32'h1600ca9b, 32'hed2923cc, 32'ha00550a0, 32'h00000000, 32'h00000000, 32'h00000000},
  '{32'hbadab1c5, 32'h99417f21, 32'h190d9c33, 32'h7ded655d, 32'h107ac94f, 32'h00000000, 32'h00000000, 32'h00000000},
  '{32'hcc5bc631, 32'hd1bd1e07, 32'h9f797f59, 32'h98227911, 32'hd430e40f, 32'h00000000, 32'h00000000, 32'h00000000},
  '{32'h708ff83f, 32'h5dbc03d3, 32'h80f9265b, 32'h6d489f1d, 32'h40e3a0ad, 32'h00000000, 32'h00000000, 32'h00000000},
  '{32'h82a84339, 32'h85bdba98, 32'h4966adf6, 32'hdc04691c, 32'h63d98e25, 32'h00000000, 32'h00000000, 32'h00000000}};
localparam int N_SHA224 = 13;
localparam int LEN_SHA224 [13] = '{0, 1, 24, 31, 32, 440, 447, 448, 480, 511, 512, 1000, 1535};
localparam logic [31:0] DIG_SHA224 [13][8] = '{
  '{32'hd14a028c, 32'h2a3a2bc9, 32'h476102bb, 32'h288234c4, 32'h15a2b01f, 32'h828ea62a, 32'hc5b3e42f, 32'h00000000},
  '{32'hd3fe57cb, 32'h76cdd24e, 32'h9eb23e7e, 32'h15684e03, 32'h9c75459b, 32'heaae100f, 32'h89712e9d, 32'h00000000},
  '{32'h3e04b905, 32'h128310bd, 32'he8ec4397, 32'h285a7338, 32'h9bc8d6c3, 32'hb0d172ed, 32'h765fcda3, 32'h00000000},
  '{32'h38d1a194, 32'h2a14f1eb, 32'h5b675019, 32'h89672e0e, 32'h07b7ec5b, 32'h01fd97fe, 32'hbdf024c6, 32'h00000000},
  '{32'h54ba58de, 32'h6da99623, 32'h50ead64a, 32'h472c7c54, 32'h035c0775, 32'habe53eb5, 32'h6520bbfe, 32'h00000000},
  '{32'h32b775fe, 32'h598bb651, 32'h99ac6873, 32'h7de32768, 32'h7adb24c0, 32'h69388026, 32'hfabb3f4f, 32'h00000000},
  '{32'h003f6131, 32'hd5e55c7f, 32'h5981930e, 32'h496172fd, 32'h46070770, 32'h33603f4d, 32'h030bfed0, 32'h00000000},
  '{32'he62baa18, 32'h6b821b87, 32'h03c008b0, 32'h223a4ce9, 32'h71b0a995, 32'h56f1eb79, 32'hf685dfbb, 32'h00000000},
  '{32'h700005bc, 32'h6438f96a, 32'h60a50ae3, 32'h80613adc, 32'h0500f500, 32'h044f301e, 32'hc0ac4a95, 32'h00000000},
  '{32'h1e34d106, 32'h8b4300fd, 32'hddadaaef, 32'h6febea04, 32'h9e992e58, 32'h1a743f08, 32'hd522978c, 32'h00000000},
  '{32'h1e665dc0, 32'he4d02c14, 32'hb3aa183d, 32'hfdc54421, 32'h965a5287, 32'h9c729d6c, 32'h988ea03e, 32'h00000000},
  '{32'haccabff4, 32'hc6636a20, 32'h5f9ccabe, 32'h5dde86e3, 32'h1d90ad78, 32'h75dea68a, 32'h17e0951b, 32'h00000000},
  '{32'h3c9f49bb, 32'h5e96ad86, 32'h9379f817, 32'h4bd2f41c, 32'h2233e4db, 32'h75420dc7, 32'h118fc752, 32'h00000000}};
localparam int N_SHA256 = 13;
localparam int LEN_SHA256 [13] = '{0, 1, 24, 31, 32, 440, 447, 448, 480, 511, 512, 1000, 1535};
localparam logic [31:0] DIG_SHA256 [13][8] = '{
  '{32'he3b0c442, 32'h98fc1c14, 32'h9afbf4c8, 32'h996fb924, 32'h27ae41e4, 32'h649b934c, 32'ha495991b, 32'h7852b855},
  '{32'hbd4f9e98, 32'hbeb68c6e, 32'had3243b1, 32'hb4c7fed7, 32'h5fa4feaa, 32'hb1f84795, 32'hcbd8a986, 32'h76a2a375},
  '{32'h37e4cc3b, 32'h04303576, 32'hffae20ca, 32'hadd86447, 32'hb8705ddf, 32'hcf8e3f6d, 32'h0ed7ab70, 32'hc2b2e584},
  '{32'h741e152f, 32'h4ea620e7, 32'h0e719f4c, 32'h47924efc, 32'h82f2e75d, 32'hba67e584, 32'h20d209a8, 32'h854208d3},
  '{32'h3f714614, 32'h0f9072f8, 32'h01b981b3, 32'hfd8d4904, 32'hfda426b0, 32'hd4987605, 32'h33bca87e, 32'hfa3e903a},
  '{32'hed1ffca9, 32'hcb68110b, 32'h7e636667, 32'ha9bfe9c8, 32'h9c448b04, 32'h21e2acee, 32'hcfb826e6, 32'h074a6e48},
  '{32'had7d3fff, 32'h65eb7d86, 32'hb94a2263, 32'h8c9dacb9, 32'h02f1289d, 32'h2ee355e3, 32'h679df047, 32'h72236e4e},
  '{32'h7b5ba7d8, 32'h8d128a4e, 32'h6a2b4c53, 32'h71519954, 32'ha337ac9e, 32'h715a55d5, 32'hb13b2a48, 32'h80c584dc},
  '{32'hf6b4f85b, 32'he525d08d, 32'h4e9dbcdd, 32'hc34be1f4, 32'h31403046, 32'hb2f66c4c, 32'h57ce5b51, 32'he81c8350},
  '{32'h7a01ab8c, 32'h179402e5, 32'h3c655f41, 32'h32ed38d2, 32'hae2e4c2e, 32'h4d87b938, 32'h8e312205, 32'h6901d97e},
  '{32'h6a26d685, 32'h47709208, 32'he28320c5, 32'h46745361, 32'h87106405, 32'h1f083a10, 32'hfcb6f54d, 32'h23fd77fa},
  '{32'h56a98ec1, 32'h9932220b, 32'hcfb7a64a, 32'h96305b13, 32'hc091f106, 32'h47351682, 32'h36aac868, 32'h0ddbcd67},
  '{32'h9b294dc1, 32'h337c2205, 32'h5629f791, 32'h956bbd42, 32'h8ad4755e, 32'h98413731, 32'hd4b8e22d, 32'hf7337ae1}};
localparam int N_SHA384 = 11;
localparam int LEN_SHA384 [11] = '{0, 1, 63, 64, 888, 895, 896, 960, 1023, 1024, 2000};
localparam logic [63:0] DIG_SHA384 [11][8] = '{
  '{64'h38b060a751ac9638, 64'h4cd9327eb1b1e36a, 64'h21fdb71114be0743, 64'h4c0cc7bf63f6e1da, 64'h274edebfe76f65fb, 64'hd51ad2f14898b95b, 64'h0000000000000000, 64'h0000000000000000},
  '{64'h634aa63038a164ae, 64'h6c7d48b319f2aca0, 64'ha107908e54851920, 64'h4c6d72dbeac0fdc3, 64'hc9246674f98e8fd3, 64'h0221ba986e737d61, 64'h0000000000000000, 64'h0000000000000000},
  '{64'h1c5e4c19a1c59dc7, 64'h41314cc939fb0099, 64'h898e59caa3854a0c, 64'h098c0a1323fb9fa0, 64'h6ef830c999efbc94, 64'h5a556d3ad92bd215, 64'h0000000000000000, 64'h0000000000000000},
  '{64'hc3b49110bada8f21, 64'had8fec38bb1d7da9, 64'h4ccad25f054147b5, 64'hba1f179d9256226c, 64'h0b6cf8d9f977a4aa, 64'h0d1a483686e78d82, 64'h0000000000000000, 64'h0000000000000000},
  '{64'h9cba0b4d12683bd6, 64'hb32c7a76b399c0ba, 64'hd7b17d02dccb648f, 64'hb3a384a21cc1f96d, 64'hab57495e79c43c00, 64'he7cf09bd305edf22, 64'h0000000000000000, 64'h0000000000000000},
  '{64'h9b0b7f98532b6480, 64'h04a3a5f693263b56, 64'h3bb3dd4166ee26d6, 64'h5349dbe80cc4b546, 64'ha89fa46f40ab0716, 64'h57c3343f9731a604, 64'h0000000000000000, 64'h0000000000000000},
  '{64'hdf8bb56238c3ea6b, 64'h919f2cbc6229b39c, 64'hc080d13c2e16287a, 64'h2a3212424941f6c3, 64'hcf7de1f93d0e4b56, 64'h57b7bc888c9e1963, 64'h0000000000000000, 64'h0000000000000000},
  '{64'h62446b0584924801, 64'he71b35d816607c6f, 64'hc77b5b31b944262e, 64'h5a8f38f20dfc07a5, 64'h40cce809d5c8ef2d, 64'he018e90eb5407f0d, 64'h0000000000000000, 64'h0000000000000000},
  '{64'h29aa970e641f43a1, 64'hfcd446cb38c7b1e6, 64'h8a5015e18f680e49, 64'h05e3011702e3502e, 64'habb38fe049c88ab5, 64'hee840f450f8b71ec, 64'h0000000000000000, 64'h0000000000000000},
  '{64'h47d0a89fe5dd9a66, 64'h86bfd501cd68a6da, 64'h0c11d7ea488e7c04, 64'he17e6174d099d5ff, 64'hef36b8be8870768d, 64'h118a01392c2569cc, 64'h0000000000000000, 64'h0000000000000000},
  '{64'h3c5412cb71275e66, 64'h1bac028bcf6b2e4b, 64'h0a6247852cbfa07e, 64'hdbc81cd511b2a28c, 64'heec8d0f8e484acf2, 64'h324c460419b88bfe, 64'h0000000000000000, 64'h0000000000000000}};
localparam int N_SHA512 = 11;
localparam int LEN_SHA512 [11] = '{0, 1, 63, 64, 888, 895, 896, 960, 1023, 1024, 2000};
localparam logic [63:0] DIG_SHA512 [11][8] = '{
  '{64'hcf83e1357eefb8bd, 64'hf1542850d66d8007, 64'hd620e4050b5715dc, 64'h83f4a921d36ce9ce, 64'h47d0d13c5d85f2b0, 64'hff8318d2877eec2f, 64'h63b931bd47417a81, 64'ha538327af927da3e},
  '{64'hb4594eb12959fc2e, 64'h6979b6783554299c, 64'hc0369f44083a8b09, 64'h55baefd8830cda22, 64'h894b0b46c0ed4949, 64'h0e391ad99af856cc, 64'h1bd96f238c7f2a17, 64'hcf37aeb7e793395a},
  '{64'hbc9706a42ff95313, 64'h11f62c81031f6cc2, 64'h23d3750a74dd4cca, 64'h9700fbd9a9f87f8e, 64'h23deaa7190f951f2, 64'h69e0b6e3e80a7cf0, 64'h4e3a8bae6602d6e3, 64'ha60964a2f8b7e226},
  '{64'hb000aea252a34ebf, 64'hf5b3da5729cf0734, 64'h326ab89fe8bd1cb2, 64'h8ef121149dcd2606, 64'he07eb30d1ac5b0e1, 64'hf73bb5944d2d8c40, 64'hc8fead40d75d1ad1, 64'h994a0e5eb2d7cb30},
  '{64'h827c6447219396c3, 64'h36c2b72a2b059c24, 64'hc72d22607886d276, 64'h6959bde8f376e588, 64'h5f4e3b009e0e5739, 64'hcad2ab80cb0ef2be, 64'hddba995d87bd0d45, 64'h6150a8b5df63f1fc},
  '{64'h1481c0b335ebd612, 64'h1b3c100522e0377f, 64'h0d65a28ffabafd72, 64'h960ee2e3b6c2b209, 64'haec0b5546d414b04, 64'h98cbea990aa7cab5, 64'hc772a507156db98f, 64'h1aa406604b595b9f},
  '{64'he891a6e8d74134f8, 64'hc7c0ac8afea55e39, 64'hfe621fce45bfb54d, 64'h699818f3294e508c, 64'hedf6d52836df26f8, 64'h2e95128187be6d68, 64'hb26513bbd51d261f, 64'h62fa15818e183cfa},
  '{64'h95e528e2bbc03779, 64'ha92b7c1b160cb32b, 64'hecc151f99dfe2d96, 64'h712df2cb57da44f5, 64'hd9e32db0e9cfca4a, 64'ha48df1ce1460eee0, 64'h95328e2d57115d4b, 64'h22bbe7a9cde8093c},
  '{64'hecfa77d895d7f9c3, 64'hedc434fe29fcb992, 64'hc278678719e1caba, 64'h9a203d7bad21d342, 64'hb78a08770a715174, 64'h42a6a47c5c83b7c4, 64'h28e46dbe8a7f13c7, 64'h3c262bdc6fed60f5},
  '{64'h006924f55d69a577, 64'h13355f7540b44427, 64'hb0e0bd3aeb36ed92, 64'h45ec8adfdae70b66, 64'h7f2b35dbb8342ef6, 64'h7b5fb5dada1b1c24, 64'h1953784b5afef5c3, 64'ha0c602ed8f422b64},
  '{64'h14205d51e8deb9cd, 64'hb5a9bb4441304c0d, 64'h016762185172394c, 64'h85c1c6f4c472974f, 64'hb67f9b8e5f21077a, 64'h5e2e6b7d0fa65898, 64'hc7c162d2a0af9986, 64'hb8d4834d66a61b05}};
