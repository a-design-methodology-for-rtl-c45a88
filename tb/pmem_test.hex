0000
1101
2202
3303
4404
5505
6606
7707
8808
9909
aa0a
bb0b
cc0c
dd0d
ee0e
ff0f
