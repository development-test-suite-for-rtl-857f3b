041b3
044a8
0479d
04a92
04d87
0507c
05371
05666
0596c
05c61
05f56
0624b
06540
06835
06b2a
06e1f
07125
0741a
0770f
07a04
07cf9
07fee
002e3
005d8
008de
00bd3
00ec8
011bd
014b2
017a7
01a9c
01d91
02097
0238c
02681
02976
02c6b
02f60
03255
0354a
03850
03b45
03e3a
0c12f
0c424
0c719
0ca0e
0cd03
0d009
0d2fe
0d5f3
0d8e8
0dbdd
0ded2
0e1c7
0e4bc
0e7c2
0eab7
0edac
0f0a1
0f396
0f68b
0f980
0fc75
