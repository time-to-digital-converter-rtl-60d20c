0751c
05af0
05fa0
03b1a
054d8
03f84
044c0
0535c
064e6
042ea
04eac
04fba
02f3a
06644
06bb2
05334
049f2
047fe
04380
05938
04074
0677a
05c26
03a3e
0880e
03aa2
0459c
05ad2
03b60
03854
08c3c
05956
03750
0384a
05e56
04894
0071c
058ca
065fe
04682
02d14
02ec2
04736
06b1c
048d0
05280
06112
03b2e
05f46
04b14
065cc
05bcc
04b50
06f90
064f0
03a66
043da
00f82
078dc
05208
08976
055dc
0620c
04f6a
03c32
06248
062f2
0495c
064d2
05104
062b6
04dda
0448e
03e26
01748
06f9a
06d9c
05c4e
06ae0
04c18
0745e
03b4c
04f56
05136
033ea
05942
02b20
02580
01e50
06cb6
064fa
0777e
072d8
050fa
04b0a
03552
07242
033c2
05f96
06734
022ec
03066
0594c
031ce
036a6
058b6
04dc6
0640a
03ff2
05ff0
04740
0533e
063ce
0369c
03930
06b26
04178
057a8
03b92
05320
03b56
08886
02512
0544c
0132e
03a02
07116
04f06
06bee
04998
0486c
05686
06220
06860
078aa
047b8
03e44
0547e
04b78
05a64
0696e
04cfe
07922
05794
04ae2
02562
032d2
06a90
05afa
05302
024ea
0605e
05dac
047c2
03d68
05de8
01afe
04182
07238
05b72
072f6
060a4
0439e
081ba
02fbc
01ea0
0523a
0510e
0659a
05212
01d24
05b90
02440
04c68
042d6
03520
05690
02256
05e74
03688
0465a
07756
05aaa
05faa
04b5a
04678
04b64
02896
02aa8
03fd4
02abc
02c92
0312e
06f0e
06aea
05fe6
03ed0
03692
056b8
04146
055b4
069e6
078b4
03d40
037c8
03db8
0578a
073e6
0730a
05bea
0643c
045ec
04038
04cc2
0579e
065d6
05820
051f4
03d18
03872
05b0e
05f50
025da
06d60
05410
041e6
048b2
06b4e
04664
06676
03d04
06888
044a2
0592e
0475e
0970e
04e52
04e84
03516
05c8a
03e30
05d66
025d0
04e48
06928
05442
03354
045ba
0498e
04916
0541a
0472c
071d4
027f6
04754
06c8e
03c5a
04c2c
04b96
05ca8
04fc4
02dbe
0339a
04d58
041fa
055be
03f3e
02878
0613a
06838
04e70
02fda
041be
05cbc
035d4
05c12
061bc
04204
0528a
03b06
068ec
051d6
05316
039bc
03b38
06040
05c76
04132
045d8
0619e
04a42
081b0
0571c
0582a
06964
068b0
05906
05398
02db4
0474a
05014
0305c
00e7e
05c6c
06608
05d52
056ae
05758
04498
037fa
042cc
04c86
04d1c
06810
0404c
0512c
08a16
06450
05366
04f7e
06c5c
0532a
06c52
0460a
055e6
03624
027d8
02968
03610
02846
04d12
05d0c
0673e
037e6
056d6
036ce
05230
0695a
04902
03fca
05ffa
04470
051ea
0493e
03430
051fe
0484e
03afc
0690a
044ac
038f4
067c0
03ab6
05f14
0316a
05226
04466
03f8e
05b68
0445c
03de0
05d7a
03d72
06126
04a6a
057d0
00ffa
04de4
04272
06dec
0438a
05762
076ac
03d7c
04484
0611c
0574e
058a2
058ac
057da
06ff4
03548
04060
037b4
06216
04aba
03e4e
04448
04c7c
04b82
04830
05672
07364
04920
080fc
05c62
04c40
04e5c
042ae
03e58
