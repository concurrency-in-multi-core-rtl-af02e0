1000
1111
1222
1333
1444
1555
1666
1777
1888
1999
1aaa
1bbb
1ccc
1ddd
1eee
1fff
