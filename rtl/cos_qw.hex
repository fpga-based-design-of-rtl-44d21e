4000
3ffb
3fec
3fd4
3fb1
3f85
3f4f
3f0f
3ec5
3e72
3e15
3daf
3d3f
3cc5
3c42
3bb6
3b21
3a82
39db
392b
3871
37b0
36e5
3612
3537
3453
3368
3274
3179
3076
2f6c
2e5a
2d41
2c21
2afb
29ce
289a
2760
2620
24da
238e
223d
20e7
1f8c
1e2b
1cc6
1b5d
19ef
187e
1709
1590
1413
1294
1112
0f8d
0e06
0c7c
0af1
0964
07d6
0646
04b5
0324
0192
0000
