1000
3000
3001
3002
3003
300b
300c
300f
1001
300d
7027
2001
4100
8120
8316
5308
8414
5700
8114
8021
1001
8021
2000
4101
5308
841e
5700
811e
5200
8021
10ff
8021
1000
3002
4001
3003
300b
300f
800a
200a
3000
200e
3001
6000
