06626
0472c
0378c
083ea
028a0
0541a
05406
04f9c
0524e
02382
0599c
06c52
031f6
05b9a
0404c
044b6
0452e
03552
06234
0425e
03624
0565e
05eec
03e12
03304
07e86
06478
01d56
013d8
031f6
052e4
0483a
053ac
0466e
0451a
05f00
060a4
02d64
03b88
079fe
04a92
05d34
06162
08098
03fc0
04dda
0493e
052d0
0407e
0690a
0510e
0681a
04d6c
05596
068ec
05906
018a6
07c10
053f2
07e22
02620
04f60
04e7a
03e30
05f8c
05d02
08020
0445c
04d58
04416
02cd8
05000
06202
07472
029ea
054ce
02e72
0510e
07742
0634c
031b0
04236
05834
02d6e
0583e
03e26
05ece
06036
03764
03b4c
06400
04a74
0788c
050fa
04eca
0369c
064f0
06586
05956
04d6c
04c54
04b5a
04b14
03f0c
057bc
07a62
0300c
052b2
035c0
02ed6
05f6e
04894
06824
05758
03aca
05924
048f8
02c24
04916
055aa
0774c
06446
03a20
0670c
07c38
02152
03958
032f0
010a4
05546
019aa
0456a
06842
0500a
05474
051ea
048b2
02b66
0505a
05dac
038ea
040ce
04ede
04a7e
06f18
071de
06a54
05096
0358e
04a2e
06ea0
04e34
07080
042fe
04394
06072
03480
06360
05dac
0733c
03eee
060ae
057e4
06356
03a8e
039e4
043b2
03534
05438
09ad8
0384a
02738
02cec
06fb8
05438
030fc
0631a
0212a
04c7c
04740
06662
04cb8
076de
055d2
03fac
0655e
03e4e
047ae
03976
03af2
06aa4
04ace
05e74
04df8
0547e
03480
05ffa
06b4e
03e58
03db8
04dbc
04830
0238c
06c48
05cf8
03f98
06464
04240
02ee0
090ba
07530
04e3e
0532a
05e38
05b2c
045b0
03bf6
06c20
052b2
03322
046be
0564a
05456
044a2
05834
044a2
04038
0640a
06ae0
06bbc
02558
02a9e
04aa6
05b68
043b2
01b4e
0190a
03160
05af0
06a54
04eac
04d58
05ce4
060e0
06658
06086
02e90
065ea
06676
0277e
075b2
042a4
0442a
04484
079c2
04998
0799a
05816
05ea6
05f64
04f10
044fc
07562
05cda
04484
061ee
032dc
06216
068e2
02f58
05ac8
04ca4
04a88
060ae
03124
02dd2
0409c
02e0e
037c8
076a2
04056
04b82
04e16
075f8
04c86
03160
0549c
03476
078c8
04efc
05082
05c58
065fe
040ba
04fb0
05e9c
03ec6
04a10
0628e
04d8a
0422c
02bfc
06392
02ddc
052da
03fca
05104
03d90
05208
06338
04326
05686
05a0a
045ba
03db8
05aaa
04c0e
06298
079d6
03e12
069dc
05fa0
04858
086ba
06450
01cde
0410a
04cd6
04d3a
04a92
01ec8
04cc2
04be6
05b5e
04ee8
0445c
04330
05a64
03ce6
04d58
03f52
02814
058f2
039b2
0170c
04998
04d80
03cf0
037aa
072ec
04588
05ec4
06928
041c8
03b06
07238
05da2
05c62
03ef8
044f2
05212
05942
040ce
055be
05bb8
03ac0
05406
0420e
06b26
03070
06f22
074fe
06568
05028
06518
0510e
06248
01e1e
05adc
0506e
026ca
03c64
06b94
05fd2
064dc
03e76
044b6
03458
0335e
06928
0341c
04ec0
04c9a
074e0
063c4
063ba
05b5e
05fe6
04614
02dfa
