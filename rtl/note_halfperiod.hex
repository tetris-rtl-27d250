000000
2c0a28
299163
273c21
250866
22f44e
20fe13
1f2408
1d6499
1bbe46
1a2fa7
18b768
175447
160514
14c8b1
139e11
128433
117a27
107f09
0f9204
0eb24c
0ddf23
0d17d4
0c5bb4
0baa23
0b028a
0a6459
09cf08
094219
08bd13
083f85
07c902
075926
06ef91
068bea
062dda
05d512
058145
05322c
04e784
04a10d
045e8a
041fc2
03e481
03ac93
0377c9
0345f5
0316ed
02ea89
02c0a2
029916
0273c2
025086
022f45
020fe1
01f241
01d64a
01bbe4
01a2fa
018b76
017544
016051
014c8b
0139e1
012843
0117a2
0107f1
00f920
00eb25
00ddf2
00d17d
00c5bb
00baa2
00b029
00a646
009cf1
009422
008bd1
0083f8
007c90
007592
006ef9
0068bf
0062de
005d51
005814
005323
004e78
004a11
0045e9
0041fc
003e48
003ac9
00377d
00345f
00316f
002ea9
002c0a
002991
00273c
002508
0022f4
0020fe
001f24
001d65
001bbe
001a30
0018b7
001754
001605
0014c9
00139e
001284
00117a
00107f
000f92
000eb2
000ddf
000d18
000c5c
000baa
000b03
000a64
0009cf
000942
0008bd
000840
0007c9
