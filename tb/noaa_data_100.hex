// 100-sample test case: one word per sample, {mode[3:0], tn[11:0], expected[11:0]}
0567567
1c69389
125144a
024a59b
15a93bc
193a3a1
18f237f
06e36a4
0b7c72e
0ad478c
019b701
16e738a
06f66fe
1b2e374
1b3338c
01496ea
07e6750
110d390
0bb17a7
08a379c
17253ae
1b053c9
13d83c2
095e721
0c2b7e2
064d7d7
069b7d0
1c543a9
080e7ac
157432f
1c21354
175c2be
14702c2
11be340
1841336
107c39a
17be379
1afe391
00ea6a1
066b6a3
0c0f707
01dc647
056c617
1bbb41c
19323dc
0c3c6ad
036c69b
085b714
04026c6
137e3c5
0c7b754
072a70e
1bfb3b0
0b51832
020577a
00fc76a
01f572b
143e41c
1109443
14dc3eb
102841e
1b0f450
1831458
1371458
190540e
08775a0
17693c1
10ba385
19ca3af
0bcb5de
11483ed
19e4406
1c1f404
029e6db
151c3c1
12e43bd
18943c0
10da3f8
14de3ea
107941f
07bb59f
06e4610
04115a8
01894ec
072a558
052c501
0a1b4dc
13af307
18b32fc
0a635bb
1a48358
0b15695
1b3b370
12a2330
103a3ac
197d3b6
140b3b7
071a73c
1b7f396
15f838d
