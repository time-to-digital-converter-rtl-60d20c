04632
04fd8
046b4
038e0
055aa
04d3a
04600
04a88
056d6
052a8
052bc
05596
04d26
04c18
05780
04a60
05b0e
04b3c
04b50
04f6a
04eac
04d94
041aa
05712
057e4
04e5c
05028
04d76
0402e
0448e
04b46
04632
052a8
04b64
04b50
04e70
056c2
05618
04d80
04538
03e94
05780
0479a
05762
04ec0
055b4
05212
04b50
055e6
03a48
043c6
04024
044b6
05b86
055b4
046d2
052b2
04290
0600e
045ba
052a8
04bbe
04bb4
054ec
04ae2
04bfa
03ff2
0508c
04ede
04a38
0466e
04600
04e34
0550a
0523a
047cc
05302
0456a
04cd6
05212
03d5e
041fa
058a2
051d6
0505a
04fe2
0576c
03ab6
04d26
04cc2
04fba
05e4c
04470
040ba
05730
0587a
0472c
041dc
04cea
04ef2
04dd0
050a0
04088
04e5c
04330
045ec
04f4c
046a0
05af0
05686
04bc8
05410
04bbe
04b14
04696
05cc6
0468c
047ea
04b78
053d4
04b28
041c8
0454c
04dbc
049a2
045ec
049b6
05014
04b46
054f6
043b2
05122
04600
05582
043da
04e20
045ba
04e34
05bae
0493e
04628
056cc
03624
050d2
04f06
047b8
05b86
045b0
03e44
03f3e
04e8e
05af0
049b6
05d66
04c2c
0477c
04b50
03e8a
043e4
05186
05258
0560e
04e70
04d6c
04268
04916
05bd6
051cc
04ec0
0515e
04cea
050be
05230
04dc6
03ff2
04e66
052f8
050fa
04c40
043da
051f4
048ee
0503c
0517c
046f0
04c90
042f4
04dc6
05208
04ec0
04a60
04e84
05578
052b2
05884
04600
04f74
04f1a
03ae8
0470e
04394
04af6
05794
04a4c
055dc
0594c
043e4
04358
047f4
0436c
051e0
0470e
0542e
04ede
04038
04eac
04e66
04ff6
0654a
049a2
04fe2
0498e
05122
047a4
055aa
05636
04920
040b0
04326
04984
0498e
059d8
044e8
05dca
05db6
04cd6
0505a
04c18
04bd2
0500a
03e9e
04614
04a06
043c6
054c4
04876
048da
048f8
04808
0558c
0542e
0519a
03db8
05712
05460
04ca4
05aaa
04934
0443e
055a0
05230
04ace
045f6
044f2
03e58
04b32
04704
04baa
0501e
04d94
05532
04e7a
050dc
047cc
052b2
04826
051b8
04a42
05640
04f6a
053fc
0472c
05492
058ac
0538e
05b2c
03fc0
04434
04768
04d1c
04ccc
04fb0
03890
055a0
04e2a
049ac
05816
06144
04dc6
04dd0
03c00
04e8e
0602c
04d44
04e0c
04970
051fe
04d8a
0443e
03ea8
0461e
05df2
0524e
04e02
05d66
0535c
05762
052c6
04f88
04c68
054ba
054d8
04ede
05ce4
0571c
0571c
05a78
05492
04d3a
04678
04916
05262
050d2
04c72
0508c
04fce
0451a
04a88
046b4
042ea
04880
04bdc
0440c
056fe
04eca
0582a
03fac
04fa6
04556
0587a
03e08
03e80
05c80
04a60
04920
0530c
047cc
05226
0447a
05a50
04bd2
048b2
03dd6
05758
0538e
04e02
0521c
04a92
04696
05320
04c22
05104
04146
04984
04452
05d70
05398
05104
0597e
04e2a
04b00
0567c
03f2a
05a46
045b0
05dfc
05c3a
04b00
044e8
049ac
056ae
059e2
04bdc
04772
05514
054d8
04768
042c2
0560e
04146
