002000000
003000000
0025672D5
0035672D5
002DA569D
003DA569D
002F00E3F
003F00E3F
102F00E3F
