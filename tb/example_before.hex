// line 8*bank+address: memory image before the transform
89375212
b2c28465
46df998d
06b97b0d
b1f05663
8484d609
c0895e81
12153524
f9d762f3
e3132cc6
63cc97c7
672307ce
ae130c5c
43593986
9c598438
80010e00
109b9921
6259c1c4
607625c0
20330340
18ccdf31
ea58ecd4
b8b1fc71
80021c00
275fcf4e
e1a056c3
5d1fb5ba
d942fcb2
8386b007
9158a022
d50a72aa
80032a00
3e24057c
60e6edc1
59c945b3
9252f824
ee4084dc
38585570
f162e8e2
80043800
54e83ba9
e02d82c0
5672d3ac
4b62f396
58fa57b1
df5808be
0dbb5f1b
80054600
6bac71d7
5f7419be
531c63a6
0472ef08
c3b42887
8657bc0c
2a13d554
80065400
8270a604
debaaebd
4fc5f39f
bd82ea7b
2e6dfb5c
2d57715a
466c4b8c
80076200
