0739020fff0000001
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff0000008
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff000000f
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff0000016
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff000001d
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff0000024
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff000002b
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff0000032
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff0000039
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff0000040
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff0000047
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff000004e
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff0000055
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff000005c
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff0000063
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
0739020fff000006a
0419a000000000000
0a016000000000000
0a026000000000000
0a036000000000000
0a046000000000000
0a056000000000000
0a066000000000000
0a076000000000000
0a086000000000000
0a096000000000000
0a0a6000000000000
0a0b6000000000000
06190300000000000
06190300007000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
00000000000000000
