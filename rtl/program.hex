AF01
E32D
39A1
3AA1
0030
5D10
210F
3111
0498
100F
64D1
234D
5581
0CFC
CE1B
61F7
B38B
99CF
0FC2
9E1C
5250
1DA2
AEB8
2FFF
0FF1
ABE1
5B03
AA11
D314
D6E9
F64F
2927
0EAB
4C5F
6009
