123456789abcdef01
2468acf13579bde02
369d0369d0369cd03
08d159e26af37bc04
1b05b05b05b05ab05
2d3a06d3a06d39a06
3f6e5d4c3b2a18907
11a2b3c4d5e6f7808
23d70a3d70a3d6709
360b60b60b60b560a
083fb72ea61d9450b
1a740da740da7340c
2ca8641fdb975230d
3edcba9876543120e
1111111111111010f
23456789abcdef010
3579be02468acdf11
07ae147ae147ace12
19e26af37c048bd13
2c16c16c16c16ac14
3e4b17e4b17e49b15
107f6e5d4c3b28a16
22b3c4d5e6f807917
34e81b4e81b4e6818
071c71c71c71c5719
1950c83fb72ea461a
2b851eb851eb8351b
3db97530eca86241c
0fedcba987654131d
2222222222222021e
3456789abcdeff11f
068acf13579bde020
