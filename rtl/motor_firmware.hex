C00
006
CFE
007
20B
02C
727
A0A
507
A04
407
A04
