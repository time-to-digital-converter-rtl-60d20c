05028
04f24
04b46
04a10
04ea2
04984
04f10
04e5c
05258
04a60
0463c
04a60
0517c
04a42
04dd0
04ac4
051a4
04a74
04fa6
047b8
0501e
051b8
05104
04998
04e02
04d26
05118
04ef2
04e66
04fa6
05582
04f74
04c4a
04880
0501e
05212
04b82
04ace
04b64
0526c
04b3c
05280
0488a
04dee
049de
04c18
0550a
050be
05096
04d6c
04948
04fb0
04af6
04e98
048d0
04ac4
0484e
04fce
05366
04ede
05096
04d94
04c7c
05046
04402
04a06
04ede
04b50
05172
0495c
04a74
04858
04fce
04bf0
05050
04bd2
04b00
04d44
04f06
057a8
04efc
051cc
04ce0
056c2
047ae
04eb6
04d8a
04858
0456a
05320
04c4a
04916
04c9a
051c2
05398
0484e
04f06
053c0
04aa6
0510e
04b46
04524
05276
055b4
04b3c
04d1c
051fe
05168
04d1c
05550
0498e
05046
04d12
04cb8
04bd2
04cea
04b96
050d2
05258
05078
054e2
04a42
04d6c
04dda
04b46
04ad8
04f60
04f6a
04f56
0541a
04c0e
0475e
05280
045d8
050dc
04ec0
04cfe
04d26
04d94
04a88
04a24
05014
049b6
04bc8
04a74
05528
04cd6
04c7c
04f7e
04d58
0532a
04ace
05316
04d9e
04eb6
04d08
05348
0556e
04c0e
04fe2
04d44
052da
04be6
04a56
04bc8
04bdc
04e16
0488a
04b64
04de4
04830
04808
04fb0
04bc8
04b82
04b0a
04bf0
052a8
04e8e
04fba
04fb0
04fe2
0535c
04ff6
052e4
04966
05046
04b1e
04c7c
0583e
051ea
05078
04b46
04dd0
04ba0
05154
04cae
04d8a
04b0a
05000
055be
04e70
04c7c
04d3a
04c2c
05320
04e52
052a8
04970
05104
04e70
04d4e
049c0
04f60
0470e
04ec0
04e52
0508c
04f88
04c18
04fec
05014
055be
04ba0
05294
04cf4
05122
05014
04d1c
0533e
04f88
04876
05014
04a24
04e02
04f56
053de
0517c
04d6c
045d8
04e5c
0541a
04f74
04b78
04f24
0495c
04bd2
04d26
04646
04a9c
05370
04970
04e34
04646
05244
04d4e
05500
057da
04bd2
0514a
051ae
04880
04e52
04b78
051a4
04c40
05596
05532
04f1a
04736
04e70
04e0c
04de4
04ef2
04c22
04d44
04920
04a74
0532a
04948
04a60
05000
048e4
05122
05334
04c4a
04c18
04e48
04cea
04dbc
050dc
052bc
04f60
04cd6
04cc2
045ba
04e5c
04894
052c6
0505a
054a6
05280
04d8a
04ec0
04e02
052bc
04b82
0512c
050a0
050a0
04f60
04d26
0521c
04bb4
04a92
047d6
04db2
04e02
05532
051fe
04c72
04c04
05334
0553c
050aa
04ba0
048f8
04c36
04b78
051ea
04eca
04f10
04b50
04f56
054d8
05186
04d44
048ee
04f10
04a06
04bbe
04eb6
04e48
05064
0526c
04aec
04a92
049ca
04fba
054c4
051ea
05442
047fe
05136
04b78
051f4
04cea
04f6a
05230
05302
056f4
05438
04f1a
04a24
04e02
04f9c
04a74
04d76
04fe2
04da8
04e0c
04e84
049c0
04d08
04f38
04628
047c2
04f74
047f4
05230
05708
0515e
04a2e
04d12
05294
055c8
04d26
05064
04d6c
04830
04ac4
050dc
0506e
0512c
0529e
04de4
047fe
0532a
04c18
04cae
