// line 8*bank+address: memory image after the transform
fe230743
fca0fcb9
fc95f640
0daefae7
0c44f888
fb60f8be
fddd7f79
00a0fee9
0499fd51
0445f5d2
112f0649
0033fc55
0036fbc8
f697ffdf
ffcdf75f
fadafedc
03f40632
ff7c0c7a
fec8014f
fce50008
fcdfdf40
08e4f80f
fa850982
045100cc
00f80466
0264f825
00fe0bbc
052cf0bb
f207feab
01740c13
ffa8f54a
faf4035f
f809044a
06f1ffbf
fe58fd00
0546fe34
0249049f
0c9df672
fd270bcc
f7be0128
fbf9fcda
0eebf967
09f40336
0228faf4
f7d702b1
050904cf
f88b026f
03ed03e2
02ddfedd
fe6cfe1a
015503ab
00c30917
fdfb03aa
fe6dfb8f
fc9b00d9
02dd0a00
052efd98
05bcf954
014c00e1
0a9cfe64
fc80fb93
fe5ef662
00fbbee3
ee4103d1
