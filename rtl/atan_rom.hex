00000000
3e652e94
3ee52daf
3f2be125
3f652a1b
3f8f38a3
3fabdb1b
3fc87c3b
3fe51bca
4000dcc8
400f2aaa
401d776f
402bc2f9
403a0d2d
404855ef
40569d21
4064e2aa
4073266b
4080b425
4087d415
408ef2f8
409610bf
409d2d5e
40a448c7
40ab62eb
40b27bbe
40b99331
40c0a937
40c7bdc3
40ced0c8
40d5e237
40dcf204
40e40022
40eb0c84
40f2171c
40f91fde
4100135f
410395d6
4107174f
410a97c4
410e172e
41119587
411512c9
41188eed
411c09ef
411f83c7
4122fc6f
412673e3
4129ea1c
412d5f13
4130d2c5
4134452a
4137b63d
413b25f8
413e9457
41420153
41456ce7
4148d70e
414c3fc2
414fa6fe
41530cbe
415670fb
4159d3b1
415d34db
41609474
4163f277
41674edf
416aa9a7
416e02cb
41715a46
4174b014
4178042f
417b5695
417ea73f
4180fb15
4182a1a9
41844759
4185ec23
41879006
418932fe
418ad50b
418c762a
418e1659
418fb597
419153e1
4192f136
41948d94
419628fa
4197c365
41995cd4
419af546
419c8cb8
419e2329
419fb898
41a14d03
41a2e069
41a472c8
41a6041e
41a7946b
41a923ae
41aab1e3
41ac3f0c
41adcb25
41af562e
41b0e026
41b2690c
41b3f0df
41b5779c
41b6fd44
41b881d5
41ba054f
41bb87b0
41bd08f7
41be8924
41c00835
41c1862a
41c30302
41c47ebc
41c5f957
41c772d3
41c8eb2f
41ca6269
41cbd883
41cd4d7a
41cec14e
41d033ff
41d1a58d
41d315f6
41d4853a
41d5f358
41d76051
41d8cc24
41da36d0
41dba055
41dd08b2
41de6fe9
41dfd5f7
41e13add
41e29e9a
41e4012f
41e5629b
41e6c2dd
41e821f7
41e97fe7
41eadcae
41ec384b
41ed92bf
41eeec08
41f04429
41f19b1f
41f2f0ec
41f4458f
41f59908
41f6eb58
41f83c7e
41f98c7c
41fadb4f
41fc28fa
41fd757c
41fec0d6
42000583
4200aa07
42014df8
4201f154
4202941d
42033652
4203d7f3
42047901
4205197c
4205b964
420658ba
4206f77c
420795ad
4208334b
4208d057
42096cd1
420a08ba
420aa412
420b3ed8
420bd90e
420c72b3
420d0bc8
420da44d
420e3c41
420ed3a7
420f6a7d
421000c4
4210967d
42112ba7
4211c043
42125452
4212e7d3
42137ac6
42140d2d
42149f08
42153056
4215c119
42165150
4216e0fc
4217701d
4217feb4
42188cc0
42191a43
4219a73d
421a33ad
421abf95
421b4af5
421bd5cc
421c601d
421ce9e6
421d7328
421dfbe4
421e841a
421f0bca
421f92f6
4220199c
42209fbe
4221255d
4221aa77
42222f0f
4222b323
422336b6
4223b9c6
42243c55
4224be63
42253ff0
4225c0fd
4226418b
4226c199
42274127
4227c038
42283eca
4228bcdf
42293a76
4229b791
422a342f
422ab051
422b2bf8
422ba724
422c21d5
422c9c0c
422d15c9
422d8f0d
422e07d9
422e802b
422ef806
422f6f69
422fe656
42305ccb
4230d2cb
42314855
4231bd69
42323209
4232a634
423319eb
42338d2f
42340000
