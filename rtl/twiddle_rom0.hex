4000000000
3fffbff9b8
3ffecff36f
3ffd4fed27
3ffb1fe6df
3ff85fe097
3ff4efda4f
3ff0efd408
3fec4fcdc1
3fe70fc77b
3fe13fc135
3fdabfbaf0
3fd3afb4ab
3fcbefae68
3fc39fa825
3fbaafa1e3
3fb12f9ba1
3fa6ff9561
3f9c3f8f22
3f90df88e4
3f84df82a7
3f783f7c6b
3f6aff7630
3f5d2f6ff7
3f4ebf69bf
3f3faf6389
3f2fff5d54
3f1fbf5721
3f0edf50ef
3efd5f4abf
3eeb3f4491
3ed88f3e65
3ec53f383a
3eb14f3212
3e9ccf2beb
3e87af25c6
3e71ef1fa4
3e5b9f1984
3e44af1366
3e2d2f0d4a
3e150f0730
3dfc4f0119
3de2fefb04
3dc90ef4f2
3dae8eeee3
3d936ee8d6
3d77bee2cc
3d5b6edcc4
3d3e8ed6c0
3d211ed0be
3d02fecabf
3ce45ec4c3
3cc51ebeca
3ca54eb8d4
3c84deb2e2
3c63deacf2
3c424ea706
3c202ea11e
3bfd6e9b38
3bda1e9556
3bb62e8f78
3b91be899d
3b6cae83c5
3b470e7df2
3b20de7822
3afa1e7256
3ad2ce6c8d
3aaaee66c9
3a827e6108
3a596e5b4c
3a2fde5593
3a05be4fdf
39dafe4a2f
39afbe4483
3983ee3edb
39578e3938
392a9e3399
38fd2e2dff
38cf1e2869
38a08e22d7
38716e1d4a
3841ce17c2
38119e123e
37e0de0cc0
37af8e0746
377dbe01d1
374b5dfc60
37187df6f5
36e50df18f
36b11dec2e
367cade6d2
3647ade17b
36121ddc2a
35dc1dd6dd
35a58dd196
356e6dcc55
3536ddc719
34febdc1e2
34c61dbcb1
348cfdb785
34535db25f
34193dad3f
33de8da825
33a36da310
3367cd9e01
332bad98f8
32ef0d93f5
32b1ed8ef8
32744d8a01
32363d8510
31f7ad8025
31b89d7b40
31790d7662
31390d7189
30f88d6cb7
30b79d67ec
30762d6327
30343d5e68
2ff1ed59b0
2faf0d54fe
2f6bcd5053
2f280d4bae
2ee3dd4711
2e9f3d4279
2e5a1d3de9
2e148d3960
2dce9d34dd
2d882d3061
2d414d2bec
2cf9fd277e
2cb23d2317
2c6a0d1eb8
2c217d1a5f
2bd87d160d
2b8efd11c3
2b452d0d80
2afadd0944
2ab02d0510
2a650d00e2
2a198cfcbd
29cd9cf89e
29814cf487
29349cf078
28e77cec70
2899ece870
284c0ce477
27fdbce086
27af0cdc9d
275ffcd8bc
27108cd4e2
26c0bcd110
26708ccd46
261ffcc984
25cf0cc5ca
257dbcc218
252c1cbe6d
24da1cbacb
2487bcb731
2434fcb39f
23e1ecb015
238e7cac93
233abca91a
22e6aca5a8
22923ca23f
223d6c9edf
21e85c9b86
2192ec9836
213d2c94ef
20e71c91b0
2090bc8e79
203a0c8b4b
1fe2fc8825
1f8bac8508
1f340c81f3
1edc2c7ee7
1e83ec7be4
1e2b6c78ea
1dd29c75f8
1d797c730f
1d201c702e
1cc67c6d57
1c6c8c6a88
1c125c67c2
1bb7dc6505
1b5d1c6251
1b021c5fa5
1aa6dc5d03
1a4b4c5a6a
19ef8c57d9
19937c5552
19373c52d4
18daac505f
187dec4df3
1820ec4b90
17c3bc4936
17663c46e5
17088c449e
16aaac425f
164c8c402a
15ee2c3dfe
158fac3bdc
1530ec39c3
14d1ec37b3
1472cc35ac
14136c33af
13b3dc31bb
13541c2fd1
12f42c2def
12940c2c18
1233cc2a4a
11d34c2885
1172ac26ca
1111dc2518
10b0ec2370
104fcc21d1
0fee7c203c
0f8d0c1eb0
0f2b6c1d2e
0ec9ac1bb6
0e67cc1a47
0e05cc18e2
0da3ac1786
0d415c1634
0cdeec14ec
0c7c6c13ad
0c19bc1278
0bb6fc114d
0b541c102b
0af11c0f13
0a8dfc0e05
0a2acc0d01
09c77c0c06
09641c0b15
09009c0a2e
089d0c0951
08395c087d
07d59c07b3
0771cc06f3
070dec063d
06a9fc0591
0645fc04ee
05e1dc0456
057dbc03c7
05198c0342
04b55c02c6
04510c0255
03ecbc01ed
03885c0190
0323fc013c
02bf8c00f2
025b1c00b2
01f69c007b
01921c004f
012d9c002c
00c91c0014
00648c0005
