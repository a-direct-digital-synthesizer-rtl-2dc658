0
1
2
2
3
4
5
5
0
1
2
2
3
4
5
5
0
1
2
2
3
4
5
5
0
1
1
2
3
4
4
5
0
1
1
2
3
4
4
5
0
1
1
2
3
3
4
5
0
1
1
2
3
3
4
4
0
1
1
2
2
3
3
4
0
1
1
2
2
3
3
4
0
0
1
1
2
2
3
3
0
0
1
1
2
2
2
3
0
0
1
1
1
2
2
2
0
0
1
1
1
1
2
2
0
0
0
1
1
1
1
1
0
0
0
0
0
1
1
1
0
0
0
0
0
0
0
0
