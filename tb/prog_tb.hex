08366
0865b
08950
08c45
08f3a
0922f
09524
09819
09b1f
09e14
0a109
0a3fe
0a6f3
0a9e8
0acdd
0afd2
0b2d8
0b5cd
0b8c2
0bbb7
0beac
0c1a1
0c496
0c78b
0ca91
0cd86
0d07b
0d370
0d665
0d95a
0dc4f
0df44
0e24a
0e53f
0e834
0eb29
0ee1e
0f113
0f408
0f6fd
0fa03
0fcf8
0ffed
002e2
005d7
008cc
00bc1
00eb6
011bc
014b1
017a6
01a9b
01d90
02085
0237a
0266f
02975
02c6a
02f5f
03254
03549
0383e
03b33
03e28
