8004
0000
d502
0004
4008
cb08
f404
0001
d502
0005
4009
cb08
f404
0002
d502
0006
400a
cb08
f404
0003
d502
0007
400b
cb08
f404
400c
e608
0100
