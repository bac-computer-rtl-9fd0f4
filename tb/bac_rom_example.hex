@0000
40FF
4DFF
4D05
@0010
0818
E505
