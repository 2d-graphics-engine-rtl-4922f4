0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
384444447c444400
7844447844447800
3844404040443800
7844444444447800
7c40407840407c00
7c40407840404000
3844405c44443c00
4444447c44444400
3810101010103800
1c08080808483000
4448506050484400
4040404040407c00
446c545444444400
444464544c444400
3844444444443800
7844447840404000
3844444454483400
7844447850484400
3c40403804047800
7c10101010101000
4444444444443800
4444444444281000
4444445454542800
4444281028444400
4444281010101000
7c04081020407c00
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
000038043c443c00
4040586444447800
0000384040443800
0404344c44443c00
000038447c403800
1824207020202000
003c44443c043800
4040586444444400
1000301010103800
0800180808483000
4040485060504800
3010101010103800
0000685454444400
0000586444444400
0000384444443800
0000784478404000
0000344c3c040400
0000586440404000
0000384038047800
2020702020241800
00004444444c3400
0000444444281000
0000444454542800
0000442810284400
000044443c043800
00007c0810207c00
0000000000000000
0000000000000000
0000000000000000
0000000000000000
0000000000000000
