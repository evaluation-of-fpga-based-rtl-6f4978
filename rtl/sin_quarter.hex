0000
0039
0072
00ac
00e5
011e
0157
0190
01c9
0203
023c
0275
02ae
02e7
0321
035a
0393
03cc
0405
043e
0478
04b1
04ea
0523
055c
0595
05ce
0608
0641
067a
06b3
06ec
0725
075e
0797
07d0
0809
0843
087c
08b5
08ee
0927
0960
0999
09d2
0a0b
0a44
0a7d
0ab6
0aef
0b28
0b61
0b9a
0bd3
0c0c
0c45
0c7d
0cb6
0cef
0d28
0d61
0d9a
0dd3
0e0c
0e45
0e7d
0eb6
0eef
0f28
0f61
0f99
0fd2
100b
1044
107c
10b5
10ee
1126
115f
1198
11d0
1209
1242
127a
12b3
12eb
1324
135c
1395
13cd
1406
143e
1477
14af
14e8
1520
1559
1591
15c9
1602
163a
1672
16ab
16e3
171b
1753
178c
17c4
17fc
1834
186c
18a4
18dc
1915
194d
1985
19bd
19f5
1a2d
1a65
1a9d
1ad5
1b0c
1b44
1b7c
1bb4
1bec
1c24
1c5b
1c93
1ccb
1d03
1d3a
1d72
1daa
1de1
1e19
1e50
1e88
1ec0
1ef7
1f2f
1f66
1f9d
1fd5
200c
2044
207b
20b2
20e9
2121
2158
218f
21c6
21fd
2235
226c
22a3
22da
2311
2348
237f
23b6
23ed
2423
245a
2491
24c8
24ff
2535
256c
25a3
25d9
2610
2647
267d
26b4
26ea
2721
2757
278e
27c4
27fa
2831
2867
289d
28d3
290a
2940
2976
29ac
29e2
2a18
2a4e
2a84
2aba
2af0
2b26
2b5b
2b91
2bc7
2bfd
2c32
2c68
2c9e
2cd3
2d09
2d3e
2d74
2da9
2ddf
2e14
2e49
2e7f
2eb4
2ee9
2f1e
2f53
2f89
2fbe
2ff3
3028
305d
3092
30c7
30fb
3130
3165
319a
31ce
3203
3238
326c
32a1
32d5
330a
333e
3373
33a7
33db
3410
3444
3478
34ac
34e0
3514
3548
357c
35b0
35e4
3618
364c
3680
36b3
36e7
371b
374e
3782
37b5
37e9
381c
384f
3883
38b6
38e9
391d
3950
3983
39b6
39e9
3a1c
3a4f
3a82
3ab5
3ae7
3b1a
3b4d
3b7f
3bb2
3be5
3c17
3c4a
3c7c
3cae
3ce1
3d13
3d45
3d77
3daa
3ddc
3e0e
3e40
3e72
3ea4
3ed5
3f07
3f39
3f6b
3f9c
3fce
3fff
4031
4062
4094
40c5
40f7
4128
4159
418a
41bb
41ec
421d
424e
427f
42b0
42e1
4311
4342
4373
43a3
43d4
4404
4435
4465
4495
44c6
44f6
4526
4556
4586
45b6
45e6
4616
4646
4676
46a5
46d5
4705
4734
4764
4793
47c2
47f2
4821
4850
487f
48af
48de
490d
493c
496a
4999
49c8
49f7
4a25
4a54
4a82
4ab1
4adf
4b0e
4b3c
4b6a
4b98
4bc6
4bf5
4c23
4c51
4c7e
4cac
4cda
4d08
4d35
4d63
4d90
4dbe
4deb
4e19
4e46
4e73
4ea0
4ecd
4efa
4f27
4f54
4f81
4fae
4fdb
5007
5034
5060
508d
50b9
50e6
5112
513e
516a
5196
51c3
51ee
521a
5246
5272
529e
52c9
52f5
5320
534c
5377
53a3
53ce
53f9
5424
544f
547a
54a5
54d0
54fb
5526
5550
557b
55a5
55d0
55fa
5625
564f
5679
56a3
56cd
56f7
5721
574b
5775
579f
57c8
57f2
581b
5845
586e
5897
58c1
58ea
5913
593c
5965
598e
59b7
59df
5a08
5a31
5a59
5a82
5aaa
5ad3
5afb
5b23
5b4b
5b73
5b9b
5bc3
5beb
5c13
5c3a
5c62
5c89
5cb1
5cd8
5d00
5d27
5d4e
5d75
5d9c
5dc3
5dea
5e11
5e38
5e5e
5e85
5eab
5ed2
5ef8
5f1f
5f45
5f6b
5f91
5fb7
5fdd
6003
6029
604e
6074
609a
60bf
60e4
610a
612f
6154
6179
619e
61c3
61e8
620d
6232
6256
627b
629f
62c4
62e8
630c
6331
6355
6379
639d
63c1
63e4
6408
642c
644f
6473
6496
64b9
64dd
6500
6523
6546
6569
658c
65af
65d1
65f4
6616
6639
665b
667e
66a0
66c2
66e4
6706
6728
674a
676b
678d
67af
67d0
67f2
6813
6834
6855
6876
6897
68b8
68d9
68fa
691b
693b
695c
697c
699c
69bd
69dd
69fd
6a1d
6a3d
6a5d
6a7d
6a9c
6abc
6adb
6afb
6b1a
6b3a
6b59
6b78
6b97
6bb6
6bd5
6bf3
6c12
6c31
6c4f
6c6e
6c8c
6caa
6cc8
6ce7
6d05
6d22
6d40
6d5e
6d7c
6d99
6db7
6dd4
6df2
6e0f
6e2c
6e49
6e66
6e83
6ea0
6ebc
6ed9
6ef6
6f12
6f2e
6f4b
6f67
6f83
6f9f
6fbb
6fd7
6ff3
700e
702a
7045
7061
707c
7097
70b3
70ce
70e9
7104
711e
7139
7154
716e
7189
71a3
71bd
71d8
71f2
720c
7226
723f
7259
7273
728c
72a6
72bf
72d8
72f2
730b
7324
733d
7356
736e
7387
73a0
73b8
73d0
73e9
7401
7419
7431
7449
7461
7479
7490
74a8
74bf
74d7
74ee
7505
751c
7534
754a
7561
7578
758f
75a5
75bc
75d2
75e8
75ff
7615
762b
7641
7657
766c
7682
7698
76ad
76c2
76d8
76ed
7702
7717
772c
7741
7755
776a
777f
7793
77a7
77bc
77d0
77e4
77f8
780c
7820
7833
7847
785a
786e
7881
7894
78a8
78bb
78ce
78e0
78f3
7906
7918
792b
793d
7950
7962
7974
7986
7998
79aa
79bb
79cd
79de
79f0
7a01
7a12
7a24
7a35
7a46
7a56
7a67
7a78
7a88
7a99
7aa9
7aba
7aca
7ada
7aea
7afa
7b0a
7b19
7b29
7b39
7b48
7b57
7b67
7b76
7b85
7b94
7ba2
7bb1
7bc0
7bce
7bdd
7beb
7bfa
7c08
7c16
7c24
7c32
7c3f
7c4d
7c5b
7c68
7c76
7c83
7c90
7c9d
7caa
7cb7
7cc4
7cd1
7cdd
7cea
7cf6
7d03
7d0f
7d1b
7d27
7d33
7d3f
7d4b
7d56
7d62
7d6d
7d79
7d84
7d8f
7d9a
7da5
7db0
7dbb
7dc5
7dd0
7dda
7de5
7def
7df9
7e03
7e0d
7e17
7e21
7e2b
7e34
7e3e
7e47
7e50
7e59
7e63
7e6c
7e74
7e7d
7e86
7e8f
7e97
7e9f
7ea8
7eb0
7eb8
7ec0
7ec8
7ed0
7ed8
7edf
7ee7
7eee
7ef5
7efd
7f04
7f0b
7f12
7f19
7f1f
7f26
7f2c
7f33
7f39
7f3f
7f45
7f4b
7f51
7f57
7f5d
7f63
7f68
7f6e
7f73
7f78
7f7d
7f82
7f87
7f8c
7f91
7f95
7f9a
7f9e
7fa3
7fa7
7fab
7faf
7fb3
7fb7
7fbb
7fbe
7fc2
7fc5
7fc9
7fcc
7fcf
7fd2
7fd5
7fd8
7fdb
7fdd
7fe0
7fe2
7fe5
7fe7
7fe9
7feb
7fed
7fef
7ff1
7ff2
7ff4
7ff5
7ff7
7ff8
7ff9
7ffa
7ffb
7ffc
7ffd
7ffd
7ffe
7ffe
7fff
7fff
7fff
7fff
