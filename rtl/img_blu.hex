00
00
00
00
00
00
00
00
00
03
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
00
00
00
00
00
01
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
1f
00
00
00
00
00
00
00
00
00
1e
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
18
00
00
00
00
00
00
00
00
00
17
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
10
00
00
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
0a
00
00
00
00
00
00
00
00
00
09
00
00
00
00
00
00
00
00
00
08
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
03
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
00
00
00
00
00
01
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
1f
00
00
00
00
00
00
00
00
00
1e
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
18
00
00
00
00
00
00
00
00
00
17
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
15
00
00
00
00
ff
00
00
00
00
14
00
00
00
00
ff
00
00
00
00
13
00
00
00
00
ff
00
00
00
00
12
00
00
00
00
ff
00
00
00
00
11
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
00
00
00
00
00
0f
00
ff
ff
ff
ff
ff
ff
ff
00
0e
00
ff
00
00
ff
00
00
00
00
0d
00
ff
00
00
ff
00
00
00
00
0c
00
ff
00
00
ff
00
00
00
00
0b
00
ff
00
00
00
00
00
00
00
0a
00
00
00
00
00
00
00
00
00
09
00
ff
ff
ff
ff
ff
ff
ff
00
08
00
00
00
00
00
00
00
ff
00
07
00
00
00
00
00
00
00
ff
00
06
00
00
00
00
00
00
00
ff
00
05
00
00
00
00
00
00
00
ff
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
03
00
00
ff
ff
ff
ff
ff
00
00
02
00
ff
00
00
00
00
00
ff
00
01
00
ff
00
00
00
00
00
ff
00
00
00
ff
00
00
00
00
00
ff
00
1f
00
00
ff
ff
ff
ff
ff
00
00
1e
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
ff
ff
ff
ff
ff
ff
ff
00
1c
00
ff
00
00
ff
00
00
00
00
1b
00
ff
00
00
ff
00
00
00
00
1a
00
ff
00
00
ff
00
00
00
00
19
00
00
ff
ff
00
00
00
00
00
18
00
00
00
00
00
00
00
00
00
17
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
10
00
00
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
0a
00
00
00
00
00
00
00
00
00
09
00
00
00
00
00
00
00
00
00
08
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
03
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
00
00
00
00
00
01
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
