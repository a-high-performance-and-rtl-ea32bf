0041011
0041213
00c1310
0141211
0400000
0400000
0241011
01c1011
0080000
0100000
0010040
0010041
0244140
01c1011
0400000
0400000
0010049
001004a
0044a49
0000000
0400000
20000b3
0024200
0024300
0044342
0000000
0080000
2000003
0200000
0000000
0024400
0044244
0034814
0144848
0000000
0080000
0021700
0180000
0000000
0200000
0000000
0010045
0044345
0010016
0080000
2000003
0200000
2000003
0810015
0041819
0041819
0441819
0080000
0100000
2000002
0241a1b
01c1a1b
0080000
0141819
0010071
0090072
0247271
01c1a1b
0441a1b
0600000
0110075
0010076
0047675
0010078
0580000
0041b18
0041a19
0400000
0410079
0047978
0000000
0400000
20000a9
0027000
0047070
0000000
0080000
2000003
0200000
2000003
0010050
0000000
0025100
0027400
0047474
0045151
0080000
00c5050
0025300
0080000
0245353
0227a00
00a7b00
0247b7a
0010052
00b7c57
0247a7c
0010056
0145252
0245157
0090059
00c5056
0180000
0090054
0245959
0200000
009007d
0247b7d
0010058
009005b
0245858
001005a
00c595b
024585a
011005d
0145a5b
0200000
0110055
01c5455
0180000
011005c
01c5c5d
001005f
009005e
01c5e5f
0010081
00c5b5e
0245a5f
0410089
0400000
0200000
0010088
0045253
0045253
0090080
0100000
0048180
004555c
064545d
05c8988
0445253
0400000
0410091
0010092
0000000
0049291
0000000
0400000
20000b0
0028200
0028300
0048382
0000000
0080000
2000003
0200000
0000000
0028400
0048284
0038a60
0128b00
0028c00
0029000
0048b8a
01c8a8c
0080000
0126300
0000000
0010085
0248385
01c9090
0080000
00c6060
001001e
009008d
0248b8d
0200000
0080000
0200000
0010061
0010062
0246161
0010064
00c6163
0046062
011001f
0100000
0200000
0000000
0180000
0180000
0010065
0000000
0010067
0010066
0046567
0046466
0100000
0100000
2000002
0180000
0180000
2000002
001001d
081001c
1040000
1040001
10c0002
10c0003
0080000
0080000
0200000
0200000
0200000
0200000
0010020
0010021
0010022
0810023
0041819
004a0a1
00ca118
014a019
0400000
0400000
0241a1b
01ca0a1
00c1a1b
0100000
009003c
001003d
0243d3c
01ca11a
064a01b
044a2a3
0410042
0110043
0010048
0044342
004a31a
05ca21b
0441819
044a2a3
00ca0a1
0110049
00c4948
004a318
064a219
05ca2a3
0600000
0080000
001004e
001004f
001005a
0244f4e
0000000
0400000
0000000
0010060
20000a0
0023e00
0023f00
0043f3e
0000000
0080000
2000003
0200000
0000000
0024000
0043e40
003442c
0124500
0044544
0000000
0080000
01a4600
0024a00
0044446
0224b00
0110041
0043f41
0000000
00b4c2e
01c4b4a
0025000
00c4a4c
0225100
0110047
0044547
0200000
009002d
01a5200
0000000
0010030
024302c
001004d
0144b4d
0000000
009002f
0045150
0180000
00c5052
0200000
0100000
0010032
0200000
0010031
01c312d
0000000
0110034
004342e
0010053
0145153
0180000
0080000
0000000
0180000
0010033
0243233
0000000
0410036
0043233
0010035
00c352f
0043233
0100000
0100000
0200000
0000000
0180000
0180000
0010055
0000000
0010037
0010056
0045655
0043637
0443637
0443637
0080000
0100000
2000002
0200000
0180000
2000002
0010058
0010059
0045958
0000000
0400000
20000a4
0025400
0045454
0000000
0080000
2000003
0200000
2000003
0010038
2000005
0023900
0025700
0045757
0043839
0080000
01439a0
00438a1
0400000
0600000
0180000
2000002
001003a
001005b
0023b00
0045b5a
0043a3b
0400000
0143ba2
0043aa3
0400000
0400000
0180000
2000003
0010061
0000000
0046160
0000000
0400000
20000ac
0025c00
0025d00
0045d5c
0000000
0080000
2000003
0200000
0000000
0025e00
0045c5e
0010024
0126200
0026300
0000000
0046362
0180000
0080000
2000002
001005f
0245d5f
0026400
00c6264
0000000
0110026
0000000
0200000
0000000
0180000
0000000
0010025
0000000
0010065
0046365
0000000
0080000
2000003
0200000
2000003
0810027
0041819
004a8a9
00ca918
014a819
0400000
0400000
0241a1b
01ca8a9
00c1a1b
0100000
009003c
001003d
0243d3c
01ca91a
064a81b
044aaab
0410042
0110043
0010048
0044342
004ab1a
05caa1b
0441819
044aaab
00ca8a9
0110049
00c4948
004ab18
064aa19
05caaab
0641819
00cb0b1
009004e
011004f
001005a
0244f4e
0241a1b
05cb0b1
00c1a1b
0110060
0090076
0010077
0200000
01cb2b3
0241819
014b2b3
009007c
011007d
0010082
0180000
024b0b1
01cb2b3
0080000
0090083
0010088
0010089
0200000
0200000
2000002
0010094
001009a
200008a
0023e00
0023f00
0043f3e
0000000
0080000
2000003
0200000
0000000
0024000
0043e40
003442c
0124500
0044544
0000000
0080000
01a4600
0024a00
0044446
0224b00
0110041
0043f41
0000000
00b4c2e
01c4b4a
0025000
00c4a4c
0225100
0110047
0044547
0200000
009002d
01a5200
0000000
0010030
024302c
001004d
0144b4d
0000000
009002f
0045150
0180000
00c5052
0200000
0100000
0010032
0200000
0010031
01c312d
0000000
0110034
004342e
0010053
0145153
0180000
0080000
0000000
0180000
0010033
0243233
0000000
0410036
0043233
0010035
00c352f
0043233
0100000
0100000
0200000
0000000
0180000
0180000
0010055
0000000
0010037
0010056
0045655
0043637
0443637
0443637
0080000
0100000
2000002
0200000
0180000
2000002
0010058
0010059
0045958
0000000
0400000
20000a4
0025400
0045454
0000000
0080000
2000003
0200000
2000003
0010038
2000005
0023900
0025700
0045757
0043839
0080000
01439a8
00438a9
0400000
0600000
0180000
2000002
001003a
001005b
0023b00
0045b5a
0043a3b
0400000
0143baa
0043aab
0400000
0400000
0180000
2000003
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
2000064
004b31a
004b21b
0400000
0400000
2000006
0048382
0000000
0400000
004b318
004b219
0400000
0400000
2000006
0048988
0000000
0400000
2000028
0025c00
0025d00
0045d5c
0000000
0080000
2000003
0200000
0000000
0025e00
0045c5e
0010024
0126200
0026300
0000000
0046362
0180000
0080000
2000002
001005f
0245d5f
0026400
00c6264
0027800
0137926
0027a00
0227e00
0047978
01c787a
00a7f00
0138025
0000000
0010065
0246365
01c7f7e
0080000
00c7e80
0010066
011007b
024797b
0200000
0080000
0180000
0010027
0010068
0200000
0010081
0047f81
0000000
0090067
2000003
0200000
2000003
0010069
2000048
0028400
0028500
0048584
0000000
0080000
2000003
0200000
0000000
0028600
0048486
001006a
0146a66
0028a00
0128b00
0048b8a
0180000
0080000
0180000
0000000
0010087
0248587
0038c6c
00c8a8c
0000000
011006e
0046e68
0200000
0100000
0180000
0000000
001006b
01c6b67
001008d
0148b8d
0000000
0090070
0000000
0180000
0000000
0200000
0000000
001006d
0046c6d
001006f
0446f69
0046c6d
0146c6d
0080000
0100000
0000000
0180000
0200000
0180000
0000000
0010071
001008f
0010090
004908f
0047071
0447071
0447071
0080000
0100000
2000002
0200000
0180000
2000002
0010092
0010093
0049392
0000000
0400000
20000a6
0028e00
0048e8e
0000000
0080000
2000003
0200000
2000003
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
0600000
0180000
2000002
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
0180000
2000003
001009b
0000000
0049b9a
0000000
0400000
20000ac
0029600
0029700
0049796
0000000
0080000
2000003
0200000
0000000
0029800
0049698
0010028
0129c00
0029d00
0000000
0049d9c
0180000
0080000
2000002
0010099
0249799
0029e00
00c9c9e
0000000
011002a
0000000
0200000
0000000
0180000
0000000
0010029
0000000
001009f
0049d9f
0000000
0080000
2000003
0200000
2000003
081002b
