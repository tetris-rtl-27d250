4c28
4c34
4728
4834
4a28
4a34
4828
4734
452d
4539
452d
4839
4c2d
4c39
4a2d
4839
472c
4738
472c
4838
4a2c
4a38
4c2c
4c38
482d
4839
452d
4539
452d
4539
002d
0039
0026
4a32
4a26
4d32
5126
5132
4f26
4d32
4c24
4c30
4c24
4830
4c24
4c30
4a24
4830
472c
4738
472c
4838
4a2c
4a38
4c2c
4c38
482d
4839
452d
4539
452d
4539
002d
0039
