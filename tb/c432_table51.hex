64f1dc65aea
740f4b9ac29
4a58eb4e678
30fbce7dad0
1a5a335755c
07bd69bc17c
4befaa1d9bc
6909b3cf4cb
5d037b3035c
08dc5ab043b
34a6e2ecfed
2500ce39e60
7f947b4455c
3c1c4417ad9
3b4475928f9
52fbc5628fa
3befb73f3d3
15ef8990a38
7747391aa5d
481dccf540a
4ed33dde6e8
23618982076
6d57fe714da
4cb41de093a
41208227d7e
0535fe0dd4e
01315197fde
10971a983dd
2becd640758
00000000000
0ae0a192d69
3c841c4fa40
34fb94d7cc1
6bae48abb32
7bb8ec1952c
24b27f1a365
35e2e864ced
1122ba3aa7e
0bb7e8b9fcd
4b5e990bdbd
49b4e7ac4db
233382fc770
2d7754e87e0
62c9b13a86f
644f50d9920
71a8affaebe
29b7240e170
7a1f09cbb3f
0e20558bd7e
13be484955f
16d43b03be0
