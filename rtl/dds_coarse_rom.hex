00
02
04
07
09
0b
0e
10
12
14
17
19
1b
1d
1f
22
24
26
28
2a
2c
2e
30
32
35
37
39
3a
3c
3e
40
42
44
45
47
49
4b
4c
4e
4f
51
53
54
55
57
58
59
5b
5c
5d
5e
5f
61
62
63
63
65
65
66
67
67
68
68
69
69
6a
6a
6b
6b
6b
6b
6b
6c
6b
6b
6b
6b
6a
6a
6a
69
69
68
67
66
66
65
64
63
62
61
5f
5e
5d
5b
5a
58
57
55
53
51
4f
4d
4b
49
47
45
42
40
3d
3b
38
35
33
30
2d
2a
27
23
20
1d
19
16
12
0f
0b
07
03
