0041011
0041213
00c1310
0141211
0641011
05c1011
0090040
0110041
0244140
01c1011
0410049
041004a
0044a49
0000000
0400000
2000059
0024200
0024300
0044342
0000000
0080000
0000000
0224400
0044244
0034814
0100000
0021700
01c4848
0000000
0090045
0044345
0200000
0080000
0010016
0200000
0000000
0810015
0041819
0041819
0441819
0080000
0100000
0241a1b
01c1a1b
0090071
0110072
0247271
01c1a1b
0410075
0410076
0047675
0041819
0441a1b
00c1b18
0141a19
0600000
0580000
0010078
0010079
0047978
0000000
0400000
200004d
0027000
0047070
0000000
0080000
0000000
0200000
0000000
0010050
0000000
0025100
0027400
0047474
0000000
00a5300
0045151
0245050
00a7a00
00b7b52
0247b7a
0245353
0090057
0090056
0227c00
0247a7c
0010054
0110059
0045252
01c5157
0080000
009007d
0247b7d
0245056
0090058
009005b
0245959
0245858
0090055
009005a
024595b
024585a
011005d
011005c
01c5a5b
01c5c5d
011005f
009005e
01c5e5f
0245b5e
0090081
0410088
0245a5f
0045455
0410080
0148180
004555c
05c545d
0445253
0410089
00c8988
0045253
0645253
0400000
0110091
0000000
0180000
0000000
0010092
0000000
0049291
0000000
0400000
200004e
0028200
2000002
0028300
0048382
0000000
00a8400
0048284
0228a00
0128b00
0010060
01a8c00
0029000
0010085
0048385
0048b8a
0080000
0080000
0248a8c
0200000
0110061
003631e
01c9090
0000000
009008d
0048b8d
0246161
0080000
0090062
0246060
0246163
009001f
0110065
0246062
0180000
0110064
0010067
01c6567
0000000
0110066
0046466
0180000
0100000
001001d
0180000
0000000
081001c
1040000
1040001
0080000
0080000
1240002
1240003
0090020
0090021
0200000
0200000
0010022
0810023
0041819
004a0a1
00ca118
014a019
0641a1b
05ca0a1
009003c
011003d
0243d3c
01ca11a
0410042
0410043
004a01b
0044342
0441a1b
044a2a3
00ca31a
014a21b
0641819
05ca2a3
0090048
0110049
0244948
01ca318
041004e
041004f
004a219
0044f4e
044a0a1
044a2a3
0080000
0080000
0200000
0200000
001005a
0010060
2000044
0023e00
0023f00
0043f3e
0000000
0080000
0000000
0224000
0043e40
003442c
0100000
0024500
01a4600
0000000
0010041
0043f41
0044544
00a4a00
00a4b00
0244446
0200000
0134c2d
003502e
01c4b4a
0000000
00b5147
0044547
0244a4c
00a5200
0110030
024302c
01c5150
011002f
009004d
01c4b4d
0200000
0090032
0010034
0245052
0000000
0110031
004312d
01c342e
0100000
0110053
01c5153
0180000
0090033
0010036
0243233
0000000
0410035
004352f
0043233
0100000
0080000
01c3233
0200000
0110037
0010055
01c3637
0043637
0090056
0100000
0245655
01c3637
0410058
0410059
0045958
0000000
0400000
2000050
0025400
0045454
0000000
0080000
0000000
0200000
0000000
0010038
2000007
0023900
0025700
0045757
0043839
00a3b00
01439a0
02438a1
0580000
041003a
001005b
0043a3b
0045b5a
0143ba2
0443aa3
0580000
0400000
0010061
0000000
0046160
0000000
0400000
2000056
0025c00
0025d00
0045d5c
0000000
0080000
0000000
0225e00
0045c5e
0036224
0126300
0046362
0180000
0080000
003645f
0245d5f
0046264
0090026
0100000
0200000
0180000
0010025
0010065
0046365
0000000
0080000
0000000
0200000
0000000
0810027
0041819
004a8a9
00ca918
014a819
0641a1b
05ca8a9
009003c
011003d
0243d3c
01ca91a
0410042
0410043
004a81b
0044342
0441a1b
044aaab
00cab1a
014aa1b
0641819
05caaab
0090048
0110049
0244948
01cab18
041004e
041004f
004aa19
0044f4e
044a8a9
044aaab
0080000
0080000
0241819
024b0b1
009005a
0110060
0241a1b
01cb0b1
0090076
0110077
0241a1b
01cb2b3
009007c
011007d
0241819
01cb2b3
0090082
0110083
024b0b1
01cb2b3
0090088
0090089
0200000
0200000
0010094
001009a
2000030
0023e00
0023f00
0043f3e
0000000
0080000
0000000
0224000
0043e40
003442c
0100000
0024500
01a4600
0000000
0010041
0043f41
0044544
00a4a00
00a4b00
0244446
0200000
0134c2d
003502e
01c4b4a
0000000
00b5147
0044547
0244a4c
00a5200
0110030
024302c
01c5150
011002f
009004d
01c4b4d
0200000
0090032
0010034
0245052
0000000
0110031
004312d
01c342e
0100000
0110053
01c5153
0180000
0090033
0010036
0243233
0000000
0410035
004352f
0043233
0100000
0080000
01c3233
0200000
0110037
0010055
01c3637
0043637
0090056
0100000
0245655
01c3637
0410058
0410059
0045958
0000000
0400000
2000050
0025400
0045454
0000000
0080000
0000000
0200000
0000000
0010038
2000007
0023900
0025700
0045757
0043839
00a3b00
01439a8
02438a9
0580000
041003a
001005b
0043a3b
0045b5a
0143baa
0443aab
0580000
0400000
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
200002e
004b31a
004b21b
0400000
0400000
2000002
0048382
004b318
044b219
0400000
0400000
2000002
0048988
0000000
0400000
2000012
0025c00
0025d00
0045d5c
0000000
0080000
0000000
0225e00
0045c5e
0036224
0126300
0046362
0180000
0080000
003645f
0245d5f
0046264
00b7826
0127900
0227a00
01c7978
0037e25
00b7f65
0046365
024787a
00a8000
0110066
0247f7e
01c7e80
0090027
011007b
024797b
0180000
0090068
0010081
0247f81
0000000
0090067
0000000
0200000
0000000
0010069
200001b
0028400
0028500
0048584
0000000
0080000
0000000
0228600
0048486
0038a6a
0128b00
0046a66
01c8b8a
0100000
00b8c87
01c8587
0200000
009006c
001006e
0248a8c
0000000
011006b
0046b67
01c6e68
0100000
011008d
01c8b8d
0180000
009006d
0010070
0246c6d
0046c6d
009006f
0446f69
0246c6d
0100000
011008f
0180000
0180000
0010071
0010090
0047071
004908f
00c7071
0447071
0600000
0100000
0010092
0180000
0000000
0010093
0000000
0049392
0000000
0400000
200004e
0028e00
0048e8e
0000000
0080000
0000000
0200000
0000000
0010072
2000003
0027300
0029100
0049191
0047273
0080000
01473b0
02472b1
0580000
0410074
0010095
0027500
0049594
0047475
0400000
01475b2
00474b3
0580000
0400000
001009b
0000000
0049b9a
0000000
0400000
2000054
0029600
0029700
0049796
0000000
0080000
0000000
0229800
0049698
0010028
0129c00
0029d00
01c9d9c
0000000
0090099
0049799
0229e00
0080000
001002a
0249c9e
0000000
0110029
0000000
0180000
0000000
001009f
0049d9f
0000000
0080000
0000000
0200000
0000000
081002b
