0041011
0041213
00c1310
0141211
0400000
0641011
01c1011
0080000
0110040
0010041
0244140
01c1011
0400000
0410049
001004a
0000000
0044a49
0000000
0400000
2000085
0024200
0024300
0044342
0000000
0080000
2000002
0200000
0024400
0044244
0034814
0144848
0000000
0080000
01a1700
0000000
0200000
0010045
0044345
0010016
0080000
2000002
0200000
2000002
0810015
0041819
0041819
0441819
0080000
0100000
0000000
0241a1b
01c1a1b
00c1819
0110071
0090072
0247271
01c1a1b
0641a1b
0410075
0110076
0010078
0047675
01c1b18
0441a19
0400000
0410079
200004e
0047978
0000000
0400000
200002f
0027000
0047070
0000000
0080000
2000002
0200000
2000002
0010050
0000000
0025100
0027400
0047474
0045151
00c5050
0080000
00a5300
0227a00
0227b00
0247b7a
0010052
0090057
0010056
0045353
0245252
00c5157
0080000
0090054
0200000
0245056
0245253
0090059
0090058
001005b
0245959
0245858
00c595b
009005a
0110091
0200000
024585a
0180000
011005d
001005c
001005f
01c5a5b
0000000
0145c5d
001005e
00c5e5f
01c5b5e
00c5a5f
0600000
0410081
0245253
0010088
0100000
0010080
0048180
0180000
0400000
0000000
0010092
2000024
0027c00
0047a7c
0000000
0100000
2000002
0180000
2000002
001007d
0047b7d
0000000
0080000
2000002
0200000
2000002
0010055
0045455
004555c
014545d
0400000
0400000
0180000
2000002
0010089
0048988
0000000
0400000
2000014
0045253
0049291
0400000
0400000
200002e
0028200
0028300
0048382
0000000
0080000
2000002
0200000
0028400
0048284
0010060
0146060
0000000
0080000
0180000
0000000
0200000
0010085
0048385
0010064
0080000
2000002
0200000
2000002
0010061
0046161
0000000
0080000
2000002
0200000
2000002
0010065
2000021
0028a00
0028b00
0048b8a
0000000
0080000
2000002
0200000
0028c00
0048a8c
001001e
0100000
2000002
0180000
2000002
001008d
0048b8d
0000000
0080000
2000002
0200000
2000002
001001f
2000004
0029000
0026300
0049090
0046163
0080000
0100000
0000000
0200000
0180000
0000000
0010062
0010067
0046062
0046567
0100000
0100000
0000000
0180000
0180000
0000000
0010066
001001d
0046466
0000000
0100000
2000002
0180000
2000002
081001c
1040000
1040001
10c0002
0080000
0080000
0200000
1240003
0200000
0090020
0010021
0010022
0200000
2000002
0810023
0041819
004a0a1
00ca118
014a019
0400000
0641a1b
01ca0a1
0080000
011003c
001003d
0243d3c
01ca11a
044a01b
0410042
0410043
0044342
0041a1b
044a2a3
00c1819
0100000
0080000
0200000
01ca2a3
024a0a1
0110048
0090049
001004e
01ca2a3
0200000
0080000
001004f
001005a
0200000
2000002
0010060
2000042
004a31a
004a21b
0400000
0400000
2000004
0044948
004a318
044a219
0400000
0400000
0044f4e
0000000
0400000
2000022
0023e00
0023f00
0043f3e
0000000
0080000
2000002
0200000
0024000
0043e40
003442c
0124500
0000000
0024600
01c4544
0000000
00c4446
0010041
0143f41
0200000
0080000
0180000
001002e
0200000
0010047
0044547
001002d
0080000
2000002
0200000
2000002
001002f
2000042
0024a00
0024b00
0044b4a
0000000
0080000
2000002
0200000
0024c00
0044a4c
0035030
014302c
0025100
0125200
0180000
0000000
01c5150
001004d
00c4b4d
0010032
00c5052
0200000
0100000
0200000
0010034
01c342e
0010031
014312d
0010053
0145153
0180000
0080000
0180000
0010036
0200000
0010033
0043233
0010035
044352f
0043233
0143233
0080000
0100000
0180000
0200000
0180000
0010037
0010055
0010056
0045655
0043637
0443637
0443637
0080000
0100000
0000000
0200000
0180000
0000000
0010058
0010059
0045958
0000000
0400000
200007a
0025400
0045454
0000000
0080000
2000002
0200000
2000002
0010038
2000003
0023900
0025700
0045757
0043839
0080000
01439a0
00438a1
0600000
0580000
0000000
001003a
001005b
0023b00
0045b5a
0043a3b
0400000
0143ba2
0043aa3
0400000
0580000
2000002
0010061
0000000
0046160
0000000
0400000
2000080
0025c00
0025d00
0045d5c
0000000
0080000
2000002
0200000
0025e00
0045c5e
0010024
0126200
0026300
0046362
0180000
0080000
0000000
001005f
0245d5f
0026400
00c6264
0010026
0100000
0200000
0000000
0180000
0010025
0000000
0010065
0046365
0000000
0080000
2000002
0200000
2000002
0810027
0041819
004a8a9
00ca918
014a819
0400000
0641a1b
01ca8a9
0080000
011003c
001003d
0243d3c
01ca91a
044a81b
0410042
0410043
0044342
0041a1b
044aaab
00c1819
0100000
0080000
0200000
01caaab
024a8a9
0110048
0090049
001004e
01caaab
0241819
00cb0b1
009004f
011005a
0200000
0241a1b
01cb0b1
0090060
0110076
0010077
0241a1b
01cb2b3
00c1819
011007c
009007d
0200000
01cb2b3
024b0b1
0110082
0090083
0010088
01cb2b3
0200000
0080000
0010089
0010094
0200000
2000002
001009a
200002c
004ab1a
004aa1b
0400000
0400000
2000004
0044948
004ab18
044aa19
0400000
0400000
0044f4e
0000000
0400000
2000022
0023e00
0023f00
0043f3e
0000000
0080000
2000002
0200000
0024000
0043e40
003442c
0124500
0000000
0024600
01c4544
0000000
00c4446
0010041
0143f41
0200000
0080000
0180000
001002e
0200000
0010047
0044547
001002d
0080000
2000002
0200000
2000002
001002f
2000042
0024a00
0024b00
0044b4a
0000000
0080000
2000002
0200000
0024c00
0044a4c
0035030
014302c
0025100
0125200
0180000
0000000
01c5150
001004d
00c4b4d
0010032
00c5052
0200000
0100000
0200000
0010034
01c342e
0010031
014312d
0010053
0145153
0180000
0080000
0180000
0010036
0200000
0010033
0043233
0010035
044352f
0043233
0143233
0080000
0100000
0180000
0200000
0180000
0010037
0010055
0010056
0045655
0043637
0443637
0443637
0080000
0100000
0000000
0200000
0180000
0000000
0010058
0010059
0045958
0000000
0400000
200007a
0025400
0045454
0000000
0080000
2000002
0200000
2000002
0010038
2000003
0023900
0025700
0045757
0043839
0080000
01439a8
00438a9
0600000
0580000
0000000
001003a
001005b
0023b00
0045b5a
0043a3b
0400000
0143baa
0043aab
0400000
0580000
2000002
0010061
0000000
0046160
0000000
0400000
200004e
004b118
004b019
0400000
0400000
2000004
0047776
0000000
0400000
004b11a
004b01b
0400000
0400000
2000004
0047d7c
0000000
0400000
200001c
0025c00
0025d00
0045d5c
0000000
0080000
2000002
0200000
0025e00
0045c5e
0010024
0126200
0026300
0046362
0180000
0080000
0000000
001005f
0245d5f
0026400
00c6264
0010026
0100000
0200000
0000000
0180000
0010025
0000000
0010065
0046365
0000000
0080000
2000002
0200000
2000002
0010027
200000c
004b31a
004b21b
0400000
0400000
2000004
0048382
0000000
0400000
004b318
004b219
0400000
0400000
2000004
0048988
0000000
0400000
200001c
0027800
0027900
0047978
0000000
0080000
2000002
0200000
0027a00
004787a
0010066
0127e00
0027f00
0047f7e
0180000
0080000
0000000
001007b
024797b
0028000
00c7e80
0010068
0100000
0200000
0000000
0180000
0010067
0000000
0010081
0047f81
0000000
0080000
2000002
0200000
2000002
0010069
200003e
0028400
0028500
0048584
0000000
0080000
2000002
0200000
0028600
0048486
001006a
0146a66
0028a00
0128b00
0180000
0000000
01c8b8a
0010087
00c8587
0038c6c
00c8a8c
0200000
0100000
0200000
001006e
01c6e68
001006b
0146b67
001008d
0148b8d
0180000
0080000
0180000
0010070
0200000
001006d
0046c6d
001006f
0446f69
0046c6d
0146c6d
0080000
0100000
0180000
0200000
0180000
0010071
001008f
0010090
004908f
0047071
0447071
0447071
0080000
0100000
0000000
0200000
0180000
0000000
0010092
0010093
0049392
0000000
0400000
200007a
0028e00
0048e8e
0000000
0080000
2000002
0200000
2000002
0010072
2000003
0027300
0029100
0049191
0047273
0080000
01473b0
00472b1
0600000
0580000
0000000
0010074
0010095
0027500
0049594
0047475
0400000
01475b2
00474b3
0400000
0580000
2000002
001009b
0000000
0049b9a
0000000
0400000
2000080
0029600
0029700
0049796
0000000
0080000
2000002
0200000
0029800
0049698
0010028
0129c00
0029d00
0049d9c
0180000
0080000
0000000
0010099
0249799
0029e00
00c9c9e
001002a
0100000
0200000
0000000
0180000
0010029
0000000
001009f
0049d9f
0000000
0080000
2000002
0200000
2000002
081002b
