0280a
073a0
03c28
02e54
05316
051c2
05dde
05956
05a0a
041f0
048f8
074b8
03cdc
04b1e
0357a
04d4e
02e18
06f9a
040ce
06a90
05cda
04fba
07c88
0348a
0652c
055d2
04362
057ee
03660
04d62
04d9e
062de
046dc
038ae
05a28
05bae
05aaa
03eda
06324
073b4
035ca
05ec4
024f4
03c1e
070ee
042ea
036d8
050c8
04c86
04e52
04a2e
041fa
048e4
05956
04c2c
0535c
068e2
05a82
05082
042f4
07198
058f2
05e60
06054
06dce
026c0
02490
04be6
04858
06536
04402
07774
035e8
04772
04b3c
050e6
05d0c
05776
0208a
06c84
05122
04e7a
06324
037c8
03c3c
0486c
06478
05208
02e90
07cb0
04984
04cae
0634c
03444
05118
06a2c
058a2
05640
017ac
05fd2
04ede
02fb2
083f4
05550
01f36
04876
05596
04c5e
08584
04538
05424
0687e
0524e
05280
06fae
0267a
06a4a
034b2
03746
03750
0323c
03c1e
033e0
05320
050c8
05be0
0803e
0542e
03944
041dc
055c8
062ca
044f2
06392
075ee
04bdc
0498e
043e4
0413c
037c8
05f3c
043da
041c8
055fa
0535c
04948
0579e
050c8
0488a
049b6
00f64
060f4
046e6
05726
065b8
0690a
054f6
06d38
0517c
04498
049f2
04c7c
0515e
05f78
04b64
05410
058ca
05ef6
04646
023b4
0452e
062ac
0448e
04b6e
031ba
04b64
05f00
03412
02260
05866
049c0
04484
0530c
03f34
02c38
04cae
072ec
048e4
03d22
04902
031c4
08048
04a2e
04920
04b96
0574e
037b4
035e8
02210
05cd0
0302a
05000
038a4
05294
0447a
02eea
042fe
079e0
03110
0730a
0271a
03188
03426
0370a
03764
066b2
05604
055d2
04eb6
0524e
06dec
05a00
08fb6
070b2
045f6
079d6
04aec
04a1a
01b58
02e5e
01c66
06edc
02d46
05d48
04b46
05d0c
0579e
04146
048d0
05104
0689c
058de
0582a
07f76
037aa
08b38
02b3e
05fbe
05816
0675c
0753a
0547e
03be2
045ba
04c54
05f28
04ace
04bc8
04f38
03a2a
067d4
06a04
060ea
04a60
05f00
0201c
04286
07936
065cc
07008
060ae
037fa
05c9e
071ac
04aba
0319c
05708
055be
05e24
04376
046b4
04dc6
04c5e
06cca
0484e
0439e
05b04
0256c
05ed8
06112
04286
0506e
05ece
05a6e
06fae
06022
05d98
03188
06b1c
047e0
04ca4
044a2
02ae4
06518
03dea
05032
05726
00b36
02e9a
08066
04cfe
03d22
0484e
06dc4
04ff6
034b2
03d7c
062fc
06356
02c2e
050e6
037aa
0230a
02422
01df6
04b3c
0263e
0574e
0696e
06824
03264
077e2
04876
05550
03980
031ce
0695a
0529e
0682e
032aa
07936
03fd4
036ba
0277e
06f72
04556
02076
05eec
05ba4
04ff6
05640
0332c
0521c
0549c
084bc
07b34
04042
040f6
05c1c
0323c
05910
07b70
06be4
045ec
05be0
05df2
02ff8
0410a
063ce
053ca
07936
05adc
038ea
050d2
0371e
06b30
04c9a
04b8c
05e42
050a0
05a46
064aa
056cc
022ce
07508
04808
0709e
0733c
06234
04560
04722
05708
03eb2
013ec
056f4
06f7c
03390
04722
04bbe
05a32
