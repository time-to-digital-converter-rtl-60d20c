04fec
04812
03a52
047ea
05096
0576c
05244
0564a
04b82
04ec0
043a8
04d3a
04c86
0655e
057ee
05636
04e7a
04bd2
0585c
04f10
04b00
05046
04dee
04f1a
04f2e
049fc
04948
04830
04768
05104
05398
0454c
049e8
041d2
050f0
062f2
05442
05078
03d40
04bb4
0587a
04588
03d36
03ebc
060ea
0447a
04af6
052e4
058d4
048ee
053fc
04cc2
04998
04e52
057a8
03c78
04510
04146
04ede
059d8
056e0
037aa
05a50
05d20
04fba
0510e
061ee
05aaa
052b2
05820
0690a
03cdc
042ea
04998
04bd2
04204
04894
050e6
0565e
03444
0538e
05bea
0495c
055dc
05fc8
06176
04b50
040ba
050b4
0551e
05852
041aa
052d0
04812
040b0
03962
047d6
04ccc
054d8
03f98
04588
04cea
03ade
04d3a
04cb8
05190
04f88
0592e
04736
04164
05e1a
0628e
05456
038b8
0672a
03aa2
052da
05014
04722
03e8a
03b1a
05906
04772
04970
0493e
05910
04e7a
03840
0569a
0479a
04b5a
049de
03aca
0530c
051f4
056ae
06018
04ae2
04e2a
045a6
050be
04b6e
051ae
0501e
053b6
05064
05f3c
0614e
04c36
04eca
041a0
035fc
05e38
047a4
03bc4
05276
052f8
03e3a
041c8
04b00
05758
04772
041aa
042ea
04416
05a6e
069be
055aa
02b70
055dc
06ee6
05e56
05384
04e5c
05938
041be
0514a
051d6
0508c
051cc
042e0
042c2
04498
056fe
05406
04d8a
03d4a
04b50
03f16
04880
04cb8
05604
0406a
047ae
053fc
04538
05456
049ac
0619e
05488
046e6
05744
0448e
05ab4
047fe
03a34
05258
03c82
04d26
06950
04c5e
051f4
06856
059ec
06040
04696
02eb8
0532a
0587a
05c76
0483a
06112
046dc
04984
04484
04bfa
05384
053f2
059d8
049e8
05cda
04d80
03d72
04aa6
06f22
05d84
05e4c
058de
0596a
04d26
03476
04b96
06aa4
04bfa
0579e
04e8e
05104
05460
04e98
05636
057bc
054ec
0416e
0553c
0602c
05258
03ade
05bd6
04e48
049ac
040c4
04ac4
04b82
0434e
034da
04718
047ae
03b42
04650
04e70
04b1e
05654
04d8a
042a4
04a60
042a4
04dd0
05726
045c4
04b0a
04ede
03e30
04bf0
04c04
04268
04858
053ca
04c90
04fba
04fa6
0375a
05c44
0597e
04f42
0583e
04844
05c8a
05258
04c2c
0484e
053b6
038e0
03fa2
056e0
04448
0544c
05aa0
05b5e
052ee
05712
03b06
053ca
04bc8
0604a
046be
04e02
0330e
04c40
047e0
06676
05c30
04a06
038e0
04308
04ae2
052a8
04c4a
044b6
04efc
052c6
053f2
049c0
04dc6
058de
03cbe
04ab0
05640
04f56
04c7c
04826
04a74
04aec
04eac
040ec
04470
04eb6
0541a
04c9a
0510e
03f2a
056f4
056ae
05370
06630
04952
05294
04ace
046f0
04a60
06158
06090
04cae
05172
0431c
041dc
05c1c
051b8
04f92
040a6
05b36
050a0
04bfa
05fbe
04d76
04c72
05fb4
042e0
05262
046b4
03ab6
04d08
03e12
0618a
0623e
04a42
04dee
054a6
05cf8
0512c
05514
05636
05bd6
0607c
059ec
04cea
041a0
04182
02c74
05d8e
03980
