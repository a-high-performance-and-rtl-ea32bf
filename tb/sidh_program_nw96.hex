0041011
0041213
00c1310
0141211
0441011
0441011
0080000
0100000
0200000
0180000
2000002
0200000
0180000
0010040
0010041
0044140
0041011
0410049
041004a
0044a49
0000000
0400000
2000111
0024200
0024300
0044342
0000000
0080000
2000005
0200000
2000003
0024400
0044244
0034814
0144848
0021700
0080000
2000003
0180000
0000000
0200000
2000003
0010045
0044345
0010016
0080000
2000005
0200000
2000005
0810015
0041819
0041819
0441819
0080000
0100000
0041a1b
0041a1b
0080000
0100000
0241819
01c1a1b
0080000
0100000
0200000
0180000
0010071
0010072
0247271
01c1a1b
0410075
0410076
0047675
0041b18
0410078
0410079
0041a19
0047978
0400000
0400000
2000109
0027000
0047070
0000000
0080000
2000005
0200000
2000005
0010050
0045050
0025100
00a7400
0047474
0045151
00a5300
00a7a00
0045353
0200000
00a7b00
0027c00
0247b7a
0247a7c
0080000
0110056
0245056
0000000
0090052
0010057
0245252
01c5157
0090059
00c5959
0200000
0080000
0010054
001007d
0247b7d
0200000
009005a
0245253
0000000
0080000
0010058
001005b
0245858
001005d
00c595b
024585a
0100000
0145a5b
0010055
0100000
0200000
0010091
01c5455
0180000
0100000
01c5253
001005c
0145c5d
001005f
009005e
01c5e5f
0010081
00c5b5e
01c5a5f
0400000
0600000
0010089
0000000
0200000
0010092
0000000
0010088
2000002
0010080
0000000
0048180
004555c
044545d
0448988
0445253
0449291
0400000
0400000
2000110
0028200
0028300
0048382
0000000
0080000
2000005
0200000
2000003
0028400
0048284
0038a60
0128b00
0028c00
0048b8a
0048a8c
00a9000
0126300
01c9090
0000000
0080000
0000000
0246060
0180000
0090085
0048385
0200000
0080000
001001e
001008d
0248b8d
0000000
0090062
0246062
0000000
0100000
0010064
0000000
0200000
0010061
0046161
01c6163
0080000
0100000
001001f
2000002
0010066
0246466
0180000
0100000
2000003
0010065
0010067
01c6567
0000000
0100000
2000003
001001c
0000000
0180000
2000005
081001d
1040000
1040001
10c0002
10c0003
0080000
0080000
2000002
0200000
0200000
0200000
0200000
2000002
0010020
0010021
0010022
0810023
0041819
004a0a1
00ca118
014a019
0441a1b
044a0a1
0080000
0100000
0241a1b
01ca2a3
0080000
0100000
0200000
01c1819
001003c
009003d
0243d3c
01ca11a
0410042
0410043
004a01b
0244342
0410048
0410049
004a31a
004a21b
0444948
041004e
044a2a3
004a318
014a219
044a0a1
044a2a3
0080000
0080000
0000000
0180000
2000002
0200000
0200000
0000000
001004f
0044f4e
0000000
041005a
0010060
20000f9
0023e00
0023f00
0043f3e
0000000
0080000
2000005
0200000
2000003
0024000
0043e40
003442c
0100000
0024500
0024600
0044544
0000000
00c4446
01a4a00
0124b00
0024c00
0000000
0044b4a
0225000
00b5141
01c3f41
0000000
00c4a4c
0000000
011002e
0245150
0010047
00c4547
0200000
0080000
0180000
0035230
004302c
0200000
011002d
0245052
001004d
0144b4d
0000000
0090034
01c342e
001002f
0100000
0180000
0000000
0200000
0010032
0000000
0180000
0010053
0045153
0010031
00c312d
0000000
0110036
2000003
0200000
0000000
0180000
2000003
0010035
004352f
0010033
0143233
0043233
00c3233
0400000
0100000
0000000
0180000
0000000
0200000
0000000
0180000
0000000
0010037
0043637
0010055
00c3637
0010056
0100000
0045655
0043637
0400000
0600000
0000000
0180000
2000003
0010058
0000000
0010059
0045958
0000000
0400000
2000106
0025400
0045454
0000000
0080000
2000005
0200000
2000005
0010038
0000000
0023900
0025700
0045757
0043839
0080000
01439a0
00438a1
0400000
0400000
0000000
0200000
0180000
0023b00
2000003
001003a
001005b
0043a3b
0045b5a
0143ba2
0443aa3
0400000
0400000
2000002
0180000
2000005
0010061
0000000
0046160
0000000
0400000
2000106
0025c00
0025d00
0045d5c
0000000
0080000
2000005
0200000
2000003
0025e00
0045c5e
0036224
0126300
0046362
0000000
0080000
2000002
0180000
2000002
0200000
2000002
003645f
0045d5f
0046264
0090026
0100000
2000004
0200000
0180000
2000004
0010025
0010065
0046365
0000000
0080000
2000005
0200000
2000005
0810027
0041819
004a8a9
00ca918
014a819
0441a1b
044a8a9
0080000
0100000
0241a1b
01caaab
0080000
0100000
0200000
01c1819
001003c
009003d
0243d3c
01ca91a
0410042
0410043
004a81b
0244342
0410048
0410049
004ab1a
004aa1b
0444948
041004e
044aaab
004ab18
014aa19
044a8a9
044aaab
00c1819
0080000
00cb0b1
01c1a1b
0100000
0080000
0200000
024b0b1
0200000
011004f
01c4f4e
0241a1b
041005a
0090060
0010076
01cb2b3
0010077
011007c
0041819
024b2b3
00cb0b1
011007d
00cb2b3
0180000
0080000
0010082
0200000
0180000
0200000
0010083
0200000
0000000
0010088
0010089
0010094
0000000
001009a
20000e2
0023e00
0023f00
0043f3e
0000000
0080000
2000005
0200000
2000003
0024000
0043e40
003442c
0100000
0024500
0024600
0044544
0000000
00c4446
01a4a00
0124b00
0024c00
0000000
0044b4a
0225000
00b5141
01c3f41
0000000
00c4a4c
0000000
011002e
0245150
0010047
00c4547
0200000
0080000
0180000
0035230
004302c
0200000
011002d
0245052
001004d
0144b4d
0000000
0090034
01c342e
001002f
0100000
0180000
0000000
0200000
0010032
0000000
0180000
0010053
0045153
0010031
00c312d
0000000
0110036
2000003
0200000
0000000
0180000
2000003
0010035
004352f
0010033
0143233
0043233
00c3233
0400000
0100000
0000000
0180000
0000000
0200000
0000000
0180000
0000000
0010037
0043637
0010055
00c3637
0010056
0100000
0045655
0043637
0400000
0600000
0000000
0180000
2000003
0010058
0000000
0010059
0045958
0000000
0400000
2000106
0025400
0045454
0000000
0080000
2000005
0200000
2000005
0010038
0000000
0023900
0025700
0045757
0043839
0080000
01439a8
00438a9
0400000
0400000
0000000
0200000
0180000
0023b00
2000003
001003a
001005b
0043a3b
0045b5a
0143baa
0443aab
0400000
0400000
2000002
0180000
2000005
0010061
0000000
0046160
004b118
044b019
0447776
044b11a
044b01b
0447d7c
0400000
0400000
200009e
004b31a
004b21b
0400000
0400000
200000a
0048382
004b318
044b219
0400000
0400000
200000a
0048988
0000000
0400000
2000042
0025c00
0025d00
0045d5c
0000000
0080000
2000005
0200000
2000003
0025e00
0045c5e
0036224
0126300
0046362
0000000
0080000
2000002
0180000
2000002
0200000
2000002
003645f
0045d5f
0046264
00b7826
0127900
0027a00
0047978
0027e00
00a7f00
024787a
01a8000
0100000
0000000
0047f7e
0247e80
0090025
0110065
01c6365
0000000
0080000
0010066
0200000
0180000
001007b
004797b
0200000
0080000
0010068
0010081
0047f81
0000000
0090027
0200000
2000004
0200000
0010067
2000004
0010069
200007b
0028400
0028500
0048584
0000000
0080000
2000005
0200000
2000003
0028600
0048486
0038a6a
0146a66
0028b00
0148b8a
0000000
0080000
0000000
0180000
0000000
0180000
0000000
0200000
0000000
0038c87
0048587
001006c
00c8a8c
001006e
0146e68
0000000
0100000
0000000
0200000
0000000
0180000
0000000
0180000
0000000
001006b
0046b67
001008d
0148b8d
0010070
0080000
2000003
0180000
0000000
0200000
2000003
001006d
0046c6d
001006f
0446f69
0046c6d
0146c6d
0080000
0100000
2000003
0180000
0200000
0180000
2000003
0010071
001008f
0010090
004908f
0047071
0447071
0447071
0080000
0100000
2000004
0200000
0180000
2000004
0010092
0010093
0049392
0000000
0400000
20000fe
0028e00
0048e8e
0000000
0080000
2000005
0200000
2000005
0010072
2000003
0027300
0029100
0049191
0047273
0080000
01473b0
00472b1
0400000
0400000
0000000
0200000
0180000
2000004
0010074
0010095
0027500
0049594
0047475
0400000
01475b2
00474b3
0400000
0400000
2000002
0180000
2000005
001009b
0000000
0049b9a
0000000
0400000
2000104
0029600
0029700
0049796
0000000
0080000
2000005
0200000
2000003
0029800
0049698
0010028
0129c00
0029d00
0049d9c
0000000
0080000
0000000
0180000
2000003
0200000
0000000
0010099
0049799
0029e00
00c9c9e
001002a
0100000
2000003
0200000
0000000
0180000
2000003
0010029
0000000
001009f
0049d9f
0000000
0080000
2000005
0200000
2000005
081002b
