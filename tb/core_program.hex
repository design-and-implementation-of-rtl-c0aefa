002081b3
40208233
022082b3
0020f333
0020e3b3
0020c433
ffb08493
00702423
00802623
00802503
00c02583
00b501b3
40048233
02b502b3
00208033
00b06333
002091b3
