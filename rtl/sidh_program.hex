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
0047978
0000000
0400000
200007d
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
00b7c57
0010056
0047a7c
0200000
0145353
0000000
0090054
0180000
0000000
0245252
001007d
00c7b7d
0010059
00c5157
0200000
00c5056
0200000
0090058
0200000
0010055
0245959
001005b
00c5858
001005a
00c595b
0200000
014585a
0200000
011005d
0180000
001005c
01c5a5b
001005f
0145c5d
001005e
00c5e5f
0180000
00c5b5e
0245a5f
0410081
0645455
0010088
0100000
0010080
0045253
01c8180
00c555c
044545d
0410089
0645253
0048988
0145253
0410091
0400000
0180000
2000002
0010092
0049291
0000000
0400000
200007e
0028200
0028300
0048382
0000000
0080000
2000002
0200000
0028400
0048284
0038a60
0128b00
0000000
0028c00
01c8b8a
0029000
00c8a8c
0010085
0148385
0200000
00c9090
01a6300
009001e
0200000
001008d
0248b8d
0010061
00c6161
0010062
00c6060
0200000
00c6163
0200000
011001f
0200000
0010065
01c6062
0010064
0100000
0010067
0046567
0180000
0100000
0000000
0010066
01c6466
0000000
0100000
001001d
0000000
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
00ca31a
014a21b
0400000
0641819
01ca2a3
0080000
0110048
0010049
0244948
01ca318
044a219
041004e
041004f
0044f4e
004a0a1
044a2a3
0080000
0080000
0000000
0200000
0200000
0000000
001005a
0010060
200006e
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
0034a41
0143f41
0224b00
00c4b4a
0180000
009002e
0200000
0034c47
0244547
003502d
00c4a4c
0035130
014302c
0225200
0145150
0180000
009002f
0180000
001004d
0244b4d
0010032
00c5052
0010034
014342e
0200000
0100000
0180000
0010031
01c312d
0010053
0145153
0010036
0080000
0180000
0000000
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
00cab1a
014aa1b
0400000
0641819
01caaab
0080000
0110048
0010049
0244948
01cab18
044aa19
041004e
041004f
0044f4e
004a8a9
044aaab
00c1819
0080000
0080000
0200000
024b0b1
0241a1b
011005a
0090060
0010076
01cb0b1
0241a1b
014b2b3
0090077
011007c
0180000
0241819
01cb2b3
009007d
0110082
0010083
024b0b1
01cb2b3
0080000
0090088
0010089
0200000
0200000
0000000
0010094
001009a
2000058
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
0034a41
0143f41
0224b00
00c4b4a
0180000
009002e
0200000
0034c47
0244547
003502d
00c4a4c
0035130
014302c
0225200
0145150
0180000
009002f
0180000
001004d
0244b4d
0010032
00c5052
0010034
014342e
0200000
0100000
0180000
0010031
01c312d
0010053
0145153
0010036
0080000
0180000
0000000
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
004b118
044b019
0447776
044b11a
044b01b
0447d7c
0400000
0400000
2000048
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
0037826
0127900
0227a00
0047978
01c787a
00b7e25
0127f00
0038065
0246365
01c7f7e
0080000
0090066
001007b
024797b
0247e80
0080000
0110027
0010068
0200000
0180000
0000000
0010067
0010081
0047f81
0000000
0080000
2000002
0200000
2000002
0010069
200002f
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
