00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
07
00
00
00
00
00
00
00
00
00
0e
00
00
00
00
00
00
00
00
00
15
00
00
00
00
00
00
00
00
00
1c
00
00
00
00
00
00
00
00
00
23
00
00
00
00
00
00
00
00
00
2a
00
00
00
00
00
00
00
00
00
31
00
00
00
00
00
00
00
00
00
38
00
00
00
00
00
00
00
00
00
3f
00
00
00
00
00
00
00
00
00
06
00
00
00
00
00
00
00
00
00
0d
00
00
00
00
00
00
00
00
00
14
00
00
00
00
00
00
00
00
00
1b
00
00
00
00
00
00
00
00
00
22
00
00
00
00
00
00
00
00
00
29
00
00
00
00
00
00
00
00
00
30
00
00
00
00
00
00
00
00
00
37
00
00
00
00
00
00
00
00
00
3e
00
00
00
00
00
00
00
00
00
05
00
00
00
00
00
00
00
00
00
0c
00
00
00
00
00
00
00
00
00
13
00
00
00
00
00
00
00
00
00
1a
00
00
00
00
00
00
00
00
00
21
00
00
00
00
00
00
00
00
00
28
00
00
00
00
00
00
00
00
00
2f
00
00
00
00
00
00
00
00
00
36
00
00
00
00
00
00
00
00
00
3d
00
00
00
00
00
00
00
00
00
04
00
80
80
80
80
80
80
80
00
0b
00
00
00
00
00
00
00
80
00
12
00
00
00
00
00
00
00
80
00
19
00
00
00
00
00
00
00
80
00
20
00
00
00
00
00
00
00
80
00
27
00
00
00
00
00
00
00
00
00
2e
00
ff
00
00
00
00
00
ff
00
35
00
ff
00
00
00
00
00
ff
00
3c
00
ff
ff
ff
ff
ff
ff
ff
00
03
00
ff
00
00
00
00
00
ff
00
0a
00
ff
00
00
00
00
00
ff
00
11
00
00
00
00
00
00
00
00
00
18
00
ff
ff
ff
ff
ff
ff
ff
00
1f
00
ff
00
00
ff
00
00
00
00
26
00
ff
00
00
ff
00
00
00
00
2d
00
ff
00
00
ff
00
00
00
00
34
00
00
ff
ff
00
00
00
00
00
3b
00
00
00
00
00
00
00
00
00
02
00
00
00
00
ff
00
00
00
00
09
00
00
00
00
ff
00
00
00
00
10
00
00
00
00
ff
00
00
00
00
17
00
00
00
00
ff
00
00
00
00
1e
00
00
00
00
ff
00
00
00
00
25
00
00
00
00
00
00
00
00
00
2c
00
ff
ff
ff
ff
ff
ff
ff
00
33
00
ff
00
00
ff
00
00
00
00
3a
00
ff
00
00
ff
00
00
00
00
01
00
ff
00
00
ff
00
00
00
00
08
00
ff
00
00
00
00
00
00
00
0f
00
00
00
00
00
00
00
00
00
16
00
00
00
00
00
00
00
00
00
1d
00
00
00
00
00
00
00
00
00
24
00
00
00
00
00
00
00
00
00
2b
00
00
00
00
00
00
00
00
00
32
00
00
00
00
00
00
00
00
00
39
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
07
00
00
00
00
00
00
00
00
00
0e
00
00
00
00
00
00
00
00
00
15
00
00
00
00
00
00
00
00
00
1c
00
00
00
00
00
00
00
00
00
23
00
00
00
00
00
00
00
00
00
2a
00
00
00
00
00
00
00
00
00
31
00
00
00
00
00
00
00
00
00
38
00
00
00
00
00
00
00
00
00
3f
00
00
00
00
00
00
00
00
00
06
00
00
00
00
00
00
00
00
00
0d
00
00
00
00
00
00
00
00
00
14
00
00
00
00
00
00
00
00
00
1b
00
00
00
00
00
00
00
00
00
22
00
00
00
00
00
00
00
00
00
29
00
00
00
00
00
00
00
00
00
30
00
00
00
00
00
00
00
00
00
37
00
00
00
00
00
00
00
00
00
3e
00
00
00
00
00
00
00
00
00
05
00
00
00
00
00
00
00
00
00
0c
00
00
00
00
00
00
00
00
00
13
00
00
00
00
00
00
00
00
00
1a
00
00
00
00
00
00
00
00
00
21
00
00
00
00
00
00
00
00
00
28
00
00
00
00
00
00
00
00
00
2f
00
00
00
00
00
00
00
00
00
36
00
00
00
00
00
00
00
00
00
3d
00
00
00
00
00
00
00
00
00
04
00
00
00
00
00
00
00
00
00
0b
00
00
00
00
00
00
00
00
00
12
00
00
00
00
00
00
00
00
00
19
00
00
00
00
00
00
00
00
00
20
00
00
00
00
00
00
00
00
00
27
00
00
00
00
00
00
00
00
00
2e
00
00
00
00
00
00
00
00
00
35
