e7650000
0000089d
00000000
0000285a
cb610000
0000e922
00000000
00001289
cd6d0000
0000d0c6
00000000
0000cb03
450d0000
00002905
00000000
00001324
f3520000
0000fdae
00000000
0000fcaa
0c530000
00000dd5
00000000
00000f2a
ef9b0000
0000f7fa
00000000
0000f5d3
17f20000
0000193a
00000000
00002346
d0f40000
0000e5a5
00000000
0000fcae
f2ab0000
0000eb10
00000000
0000dd96
2f800000
00001ab2
00000000
0000ff52
15900000
0000197b
00000000
000018de
e9ed0000
0000fb58
00000000
0000081c
f6a20000
0000fef6
00000000
00000c58
e96a0000
0000ef6f
00000000
0000f52d
084f0000
00000015
00000000
0000f360
199f0000
000015ce
00000000
000016b1
e1b30000
0000eb2e
00000000
0000e843
23b60000
0000181a
00000000
00000966
02a10000
00000b8e
00000000
00000ea2
f5ca0000
000002ba
00000000
00000edd
edab0000
0000f8dd
00000000
0000030e
fc3f0000
000000fb
00000000
0000066d
fb170000
000002f9
00000000
00000d74
f0270000
0000fcb6
00000000
00001054
e3ef0000
0000ef41
00000000
0000fe67
fe4f0000
00000361
00000000
00001b65
cc060000
0000da27
00000000
0000f148
ff100000
0000f5c0
00000000
000000a0
e7180000
0000dcf1
00000000
0000cdf0
3d790000
00001d86
00000000
0000f987
204d0000
00002408
00000000
0000314e
bcbd0000
0000d82f
00000000
0000f195
06d20000
000002af
00000000
00001510
d21b0000
0000dbe5
00000000
0000f96c
e3d90000
0000d5d3
00000000
0000d7bc
13110000
0000eb69
00000000
0000c171
4e4d0000
00001f87
00000000
0000e793
32c90000
00001f53
00000000
0000fd5b
13f90000
00000e2a
00000000
0000f42b
24360000
000020f0
00000000
00001db9
d9dc0000
0000e3d5
00000000
0000d945
38f10000
000022af
00000000
00000682
0a040000
00000e14
00000000
00000603
03a10000
00000850
00000000
0000057b
fece0000
00000169
00000000
0000f9f6
11040000
00000f11
00000000
00000628
03cf0000
000009b2
00000000
00000747
03080000
00000d8f
00000000
00001bcb
dc0f0000
0000f043
00000000
000012d1
cbc70000
0000ce68
00000000
0000d4dd
1f470000
0000f9ec
00000000
0000cb1b
50670000
00002c6a
00000000
0000f8be
26fe0000
000021ff
00000000
00000821
0d000000
00001145
00000000
0000faa4
24b70000
00002854
00000000
00001bf4
f7fe0000
00001005
00000000
000019b8
f0420000
00000879
00000000
00001cc1
e1eb0000
0000fa75
00000000
000016c8
dbac0000
0000ea89
00000000
0000f60f
0da40000
00000c41
00000000
000008cb
057a0000
00001691
00000000
00003757
adbb0000
0000ce63
00000000
0000f16b
fff30000
0000f886
00000000
0000faf6
03800000
0000032d
00000000
00000cc0
e90d0000
0000f08f
00000000
0000fd6c
fa040000
0000f88e
00000000
0000fefe
f8c00000
0000f642
00000000
0000f6a5
07460000
0000ffc9
00000000
0000f3cf
1aea0000
00001a3b
00000000
00002386
d0f50000
0000e724
00000000
000002c8
ec190000
0000ed5e
00000000
0000f988
fab40000
0000f595
00000000
0000fba5
f96b0000
0000f4a0
00000000
0000fcbb
f0b00000
0000e648
00000000
0000dc58
24200000
000007e6
00000000
0000e34a
36350000
000027eb
00000000
00001b56
e44f0000
0000f1fc
00000000
0000f53b
10450000
00000c5f
00000000
00000aa0
f75c0000
000001cc
00000000
00001981
cc0d0000
0000d4f9
00000000
0000df89
193b0000
000002d8
00000000
0000f854
fe760000
0000f010
00000000
0000d79f
39620000
00001fd2
00000000
000002f6
0b8c0000
00000e47
00000000
000011ed
e32b0000
0000e799
00000000
0000e1e5
27f20000
000017b8
00000000
00001205
e2680000
0000e620
00000000
0000e9f0
07e70000
0000ed03
00000000
0000c295
58db0000
00002f6e
00000000
0000fa9b
1dac0000
000013a1
00000000
0000ed67
2fb20000
00002076
00000000
0000ed44
46350000
000043bb
00000000
00003118
dc910000
0000f8d9
00000000
0000eee8
35e80000
0000372a
00000000
000029ab
eea30000
00001335
00000000
00002bb4
d66c0000
0000fad2
00000000
00001f5d
d3020000
0000e92d
00000000
0000fbda
03ef0000
00000430
00000000
0000f7e8
266a0000
000031be
00000000
000047b1
aa670000
0000da4e
00000000
00000523
f3c20000
0000015b
00000000
00001f07
d1f50000
0000ebe5
00000000
000018ae
c9240000
0000d912
00000000
0000fa5c
ed6c0000
0000e897
00000000
0000f4b8
f9c00000
0000ecbf
00000000
0000dfa8
29c70000
00001656
00000000
000001fa
0a8e0000
00000d67
00000000
0000066d
095a0000
0000159e
00000000
0000220e
dede0000
0000fcd8
00000000
000024ef
c57d0000
0000e020
00000000
000004d4
ecbf0000
0000f7ce
00000000
00001ece
bed50000
0000d025
00000000
0000f097
fd400000
0000f8b3
00000000
00001809
be680000
0000c547
00000000
0000de7f
06120000
0000e99b
00000000
0000da84
251e0000
00000bb3
00000000
00000094
f7580000
0000f372
00000000
0000f9b1
f66e0000
0000ece1
00000000
0000ef2e
01030000
0000ee90
00000000
0000e46b
13770000
0000f9cb
00000000
0000e586
150d0000
0000f77b
00000000
0000cb31
4f570000
00002bb9
00000000
0000fede
15230000
00000f1d
00000000
0000efe4
2edb0000
0000297c
00000000
0000193e
f53e0000
0000085d
00000000
000012b7
ee320000
0000fcc8
00000000
00000769
fbc00000
000007b4
00000000
00002270
c4e30000
0000d6f2
00000000
0000ee24
042b0000
0000f881
00000000
0000fc1f
f47a0000
0000ea87
00000000
0000dce9
2e5d0000
00001b32
00000000
0000135c
e4e40000
0000ed94
00000000
0000ff5f
e5ee0000
0000d852
00000000
0000c1b4
4d040000
000022cd
00000000
0000f300
25340000
00001bcf
00000000
00000900
fd9a0000
0000fd6e
00000000
0000e673
35360000
00002aac
00000000
00001aae
eea70000
0000ff17
00000000
0000ff94
0d870000
0000137e
00000000
000018f4
e71d0000
0000fa2f
00000000
00001183
dd710000
0000e410
00000000
0000e143
2dc80000
000021c1
00000000
00001c97
e5130000
0000fae3
00000000
000018f1
d0110000
0000dca6
00000000
0000ee1a
07370000
0000fb0e
00000000
0000f995
fd340000
0000f2ed
00000000
0000e2c4
29af0000
00001807
00000000
000003f7
07220000
00000a10
00000000
0000048d
062a0000
00000e6e
00000000
00001b8a
d9470000
0000e8d9
00000000
0000f426
0dcc0000
00000b35
00000000
000010b5
eb850000
0000f98f
00000000
00001314
d9410000
0000e506
00000000
00000026
e6090000
0000e03e
00000000
0000deb3
249e0000
00001454
00000000
00001df9
c3330000
0000c9bd
00000000
0000cdc6
2f1f0000
00000c5a
00000000
0000efbb
18c00000
00000c4d
00000000
000001ec
fbd20000
0000f8d5
00000000
0000f49e
0ab00000
000001f4
00000000
000001d2
ef6f0000
0000e677
00000000
0000d5ad
33900000
00001524
00000000
0000ef00
28050000
00001eed
00000000
00001482
e8db0000
0000ef0a
00000000
0000e325
30930000
00002428
00000000
00001c3f
e1ea0000
0000f1d7
00000000
0000ff58
f75c0000
0000f36a
00000000
0000eb1e
1e010000
0000133d
00000000
00000c3f
f4240000
0000fc30
00000000
000009af
e7a50000
0000e9c1
00000000
0000f03f
06680000
0000f84d
00000000
0000ee7c
102a0000
0000012e
00000000
0000f4c5
0a190000
0000fe47
00000000
0000f510
039d0000
0000f27b
00000000
0000d5d0
3a580000
00001b76
00000000
0000ef8e
2af70000
00001fe2
00000000
000005a9
0d6b0000
000011e5
00000000
00000a0b
00800000
000009ad
00000000
0000124e
e57e0000
0000edfa
00000000
0000f3fe
07240000
0000fbe5
00000000
0000edb0
18c50000
00000a99
00000000
0000f7e9
0f500000
00000629
00000000
0000f1fc
1b0f0000
00001000
00000000
0000f793
1bb60000
000017a9
00000000
00000999
02340000
000009e2
00000000
00000e43
ebb40000
0000efa3
00000000
0000e74f
24490000
00001553
00000000
00000211
06d20000
00000523
00000000
0000f66c
15420000
00000cb2
00000000
0000f23e
25e60000
00001e44
00000000
00000036
22060000
00002ad9
00000000
00002715
