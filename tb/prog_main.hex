00000
002f5
005ea
008df
00bd4
00ec9
011be
014b3
017b9
01aae
01da3
02098
0238d
02682
02977
02c6c
02f72
03267
0355c
03851
03b46
03e3b
04130
04425
0472b
04a20
04d15
0500a
052ff
055f4
058e9
05bde
05ee4
061d9
064ce
067c3
06ab8
06dad
070a2
07397
0769d
07992
07c87
07f7c
08271
08566
0885b
08b50
08e56
0914b
09440
09735
09a2a
09d1f
0a014
0a309
0a60f
0a904
0abf9
0aeee
0b1e3
0b4d8
0b7cd
0bac2
