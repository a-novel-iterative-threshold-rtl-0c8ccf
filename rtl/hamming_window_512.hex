0a3d
0a3f
0a42
0a48
0a50
0a5a
0a66
0a75
0a86
0a99
0aaf
0ac7
0ae1
0afd
0b1b
0b3c
0b5f
0b84
0bac
0bd5
0c01
0c2f
0c5f
0c92
0cc6
0cfd
0d36
0d71
0daf
0dee
0e2f
0e73
0eb9
0f01
0f4b
0f97
0fe5
1035
1087
10db
1131
1189
11e4
1240
129e
12fe
1360
13c4
142a
1491
14fb
1566
15d4
1643
16b4
1726
179b
1811
1889
1903
197e
19fb
1a7a
1afa
1b7c
1c00
1c85
1d0c
1d94
1e1e
1ea9
1f36
1fc4
2054
20e5
2178
220c
22a1
2337
23cf
2468
2503
259f
263b
26da
2779
2819
28bb
295d
2a01
2aa6
2b4b
2bf2
2c9a
2d42
2dec
2e96
2f42
2fee
309b
3149
31f7
32a7
3356
3407
34b9
356a
361d
36d0
3784
3838
38ed
39a2
3a58
3b0e
3bc4
3c7b
3d32
3dea
3ea1
3f59
4011
40ca
4182
423b
42f4
43ad
4466
451f
45d8
4691
474a
4802
48bb
4974
4a2c
4ae4
4b9c
4c54
4d0b
4dc2
4e79
4f30
4fe6
509b
5151
5205
52ba
536d
5420
54d3
5585
5636
56e7
5797
5846
58f5
59a3
5a50
5afc
5ba7
5c51
5cfb
5da4
5e4b
5ef2
5f98
603d
60e0
6183
6224
62c5
6364
6402
649f
653b
65d5
666e
6706
679d
6832
68c6
6958
69e9
6a79
6b07
6b94
6c1f
6ca9
6d32
6db8
6e3e
6ec1
6f43
6fc3
7042
70bf
713b
71b4
722c
72a3
7317
738a
73fb
746a
74d7
7542
75ac
7614
767a
76dd
773f
77a0
77fe
785a
78b4
790c
7962
79b7
7a09
7a59
7aa7
7af3
7b3d
7b85
7bca
7c0e
7c4f
7c8f
7ccc
7d07
7d40
7d77
7dac
7dde
7e0e
7e3c
7e68
7e92
7eb9
7ede
7f01
7f22
7f41
7f5d
7f77
7f8f
7fa4
7fb7
7fc8
7fd7
7fe4
7fee
7ff6
7ffb
7fff
8000
7fff
7ffb
7ff6
7fee
7fe4
7fd7
7fc8
7fb7
7fa4
7f8f
7f77
7f5d
7f41
7f22
7f01
7ede
7eb9
7e92
7e68
7e3c
7e0e
7dde
7dac
7d77
7d40
7d07
7ccc
7c8f
7c4f
7c0e
7bca
7b85
7b3d
7af3
7aa7
7a59
7a09
79b7
7962
790c
78b4
785a
77fe
77a0
773f
76dd
767a
7614
75ac
7542
74d7
746a
73fb
738a
7317
72a3
722c
71b4
713b
70bf
7042
6fc3
6f43
6ec1
6e3e
6db8
6d32
6ca9
6c1f
6b94
6b07
6a79
69e9
6958
68c6
6832
679d
6706
666e
65d5
653b
649f
6402
6364
62c5
6224
6183
60e0
603d
5f98
5ef2
5e4b
5da4
5cfb
5c51
5ba7
5afc
5a50
59a3
58f5
5846
5797
56e7
5636
5585
54d3
5420
536d
52ba
5205
5151
509b
4fe6
4f30
4e79
4dc2
4d0b
4c54
4b9c
4ae4
4a2c
4974
48bb
4802
474a
4691
45d8
451f
4466
43ad
42f4
423b
4182
40ca
4011
3f59
3ea1
3dea
3d32
3c7b
3bc4
3b0e
3a58
39a2
38ed
3838
3784
36d0
361d
356a
34b9
3407
3356
32a7
31f7
3149
309b
2fee
2f42
2e96
2dec
2d42
2c9a
2bf2
2b4b
2aa6
2a01
295d
28bb
2819
2779
26da
263b
259f
2503
2468
23cf
2337
22a1
220c
2178
20e5
2054
1fc4
1f36
1ea9
1e1e
1d94
1d0c
1c85
1c00
1b7c
1afa
1a7a
19fb
197e
1903
1889
1811
179b
1726
16b4
1643
15d4
1566
14fb
1491
142a
13c4
1360
12fe
129e
1240
11e4
1189
1131
10db
1087
1035
0fe5
0f97
0f4b
0f01
0eb9
0e73
0e2f
0dee
0daf
0d71
0d36
0cfd
0cc6
0c92
0c5f
0c2f
0c01
0bd5
0bac
0b84
0b5f
0b3c
0b1b
0afd
0ae1
0ac7
0aaf
0a99
0a86
0a75
0a66
0a5a
0a50
0a48
0a42
0a3f
