20080005
2009000a
01095020
ac0a0004
8c0b0004
1000ffff
08000000
3c3c3c3c
