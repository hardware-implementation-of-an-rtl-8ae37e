a5cd
4d3c
ca26
18b8
2516
3031
bb3b
1db2
6dec
1332
2c01
de06
d61a
23c4
7b38
2e71
