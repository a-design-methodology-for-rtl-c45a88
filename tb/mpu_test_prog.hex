1012
3014
1034
4014
3015
5150
3016
830a
10ee
301e
540f
5530
56ff
3017
5900
5800
5700
3018
5270
3019
530c
8217
8119
10bd
301e
702b
301a
200a
300f
200e
300b
1007
300c
1003
300d
1000
8517
1080
8617
301b
10a5
301e
802a
5001
702e
6000
0000
6000
