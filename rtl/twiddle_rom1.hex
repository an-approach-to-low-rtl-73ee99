00000c0000
ff9b8c0005
ff36fc0014
fed27c002c
fe6dfc004f
fe097c007b
fda4fc00b2
fd408c00f2
fcdc1c013c
fc77bc0190
fc135c01ed
fbaf0c0255
fb4abc02c6
fae68c0342
fa825c03c7
fa1e3c0456
f9ba1c04ee
f9561c0591
f8f22c063d
f88e4c06f3
f82a7c07b3
f7c6bc087d
f7630c0951
f6ff7c0a2e
f69bfc0b15
f6389c0c06
f5d54c0d01
f5721c0e05
f50efc0f13
f4abfc102b
f4491c114d
f3e65c1278
f383ac13ad
f3212c14ec
f2bebc1634
f25c6c1786
f1fa4c18e2
f1984c1a47
f1366c1bb6
f0d4ac1d2e
f0730c1eb0
f0119c203c
efb04c21d1
ef4f2c2370
eeee3c2518
ee8d6c26ca
ee2ccc2885
edcc4c2a4a
ed6c0c2c18
ed0bec2def
ecabfc2fd1
ec4c3c31bb
ebecac33af
eb8d4c35ac
eb2e2c37b3
eacf2c39c3
ea706c3bdc
ea11ec3dfe
e9b38c402a
e9556c425f
e8f78c449e
e899dc46e5
e83c5c4936
e7df2c4b90
e7822c4df3
e7256c505f
e6c8dc52d4
e66c9c5552
e6108c57d9
e5b4cc5a6a
e5593c5d03
e4fdfc5fa5
e4a2fc6251
e4483c6505
e3edbc67c2
e3938c6a88
e3399c6d57
e2dffc702e
e2869c730f
e22d7c75f8
e1d4ac78ea
e17c2c7be4
e123ec7ee7
e0cc0c81f3
e0746c8508
e01d1c8825
dfc60c8b4b
df6f5c8e79
df18fc91b0
dec2ec94ef
de6d2c9836
de17bc9b86
ddc2ac9edf
dd6ddca23f
dd196ca5a8
dcc55ca91a
dc719cac93
dc1e2cb015
dbcb1cb39f
db785cb731
db25fcbacb
dad3fcbe6d
da825cc218
da310cc5ca
d9e01cc984
d98f8ccd46
d93f5cd110
d8ef8cd4e2
d8a01cd8bc
d8510cdc9d
d8025ce086
d7b40ce477
d7662ce870
d7189cec70
d6cb7cf078
d67eccf487
d6327cf89e
d5e68cfcbd
d59b0d00e2
d54fed0510
d5053d0944
d4baed0d80
d4711d11c3
d4279d160d
d3de9d1a5f
d3960d1eb8
d34ddd2317
d3061d277e
d2becd2bec
d277ed3061
d2317d34dd
d1eb8d3960
d1a5fd3de9
d160dd4279
d11c3d4711
d0d80d4bae
d0944d5053
d0510d54fe
d00e2d59b0
cfcbdd5e68
cf89ed6327
cf487d67ec
cf078d6cb7
cec70d7189
ce870d7662
ce477d7b40
ce086d8025
cdc9dd8510
cd8bcd8a01
cd4e2d8ef8
cd110d93f5
ccd46d98f8
cc984d9e01
cc5cada310
cc218da825
cbe6ddad3f
cbacbdb25f
cb731db785
cb39fdbcb1
cb015dc1e2
cac93dc719
ca91adcc55
ca5a8dd196
ca23fdd6dd
c9edfddc2a
c9b86de17b
c9836de6d2
c94efdec2e
c91b0df18f
c8e79df6f5
c8b4bdfc60
c8825e01d1
c8508e0746
c81f3e0cc0
c7ee7e123e
c7be4e17c2
c78eae1d4a
c75f8e22d7
c730fe2869
c702ee2dff
c6d57e3399
c6a88e3938
c67c2e3edb
c6505e4483
c6251e4a2f
c5fa5e4fdf
c5d03e5593
c5a6ae5b4c
c57d9e6108
c5552e66c9
c52d4e6c8d
c505fe7256
c4df3e7822
c4b90e7df2
c4936e83c5
c46e5e899d
c449ee8f78
c425fe9556
c402ae9b38
c3dfeea11e
c3bdcea706
c39c3eacf2
c37b3eb2e2
c35aceb8d4
c33afebeca
c31bbec4c3
c2fd1ecabf
c2defed0be
c2c18ed6c0
c2a4aedcc4
c2885ee2cc
c26caee8d6
c2518eeee3
c2370ef4f2
c21d1efb04
c203cf0119
c1eb0f0730
c1d2ef0d4a
c1bb6f1366
c1a47f1984
c18e2f1fa4
c1786f25c6
c1634f2beb
c14ecf3212
c13adf383a
c1278f3e65
c114df4491
c102bf4abf
c0f13f50ef
c0e05f5721
c0d01f5d54
c0c06f6389
c0b15f69bf
c0a2ef6ff7
c0951f7630
c087df7c6b
c07b3f82a7
c06f3f88e4
c063df8f22
c0591f9561
c04eef9ba1
c0456fa1e3
c03c7fa825
c0342fae68
c02c6fb4ab
c0255fbaf0
c01edfc135
c0190fc77b
c013cfcdc1
c00f2fd408
c00b2fda4f
c007bfe097
c004ffe6df
c002cfed27
c0014ff36f
c0005ff9b8
