05ff
2afe
4ffd
74fc
99fb
befa
e3f9
08f8
2df7
52f6
77f5
9cf4
c1f3
e6f2
0bf1
30f0
