4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
52
50
53
56
54
57
55
58
5b
59
5c
5a
5b
5c
58
59
55
56
57
53
54
50
51
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4b
4a
49
43
48
48
4d
52
54
5c
5e
66
6d
70
77
7a
82
89
8c
93
96
9d
a5
a7
af
b2
ae
aa
a2
9e
96
92
8f
86
83
7a
76
73
6a
67
5e
5b
57
4f
4c
44
41
3e
40
47
49
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
53
51
54
52
54
57
55
58
56
58
5b
59
5c
5a
5c
5f
5d
60
5e
60
63
61
64
62
64
67
65
68
66
67
68
64
65
62
63
64
60
61
5e
5f
60
5c
5d
5a
5b
5c
58
59
56
57
58
54
55
52
53
54
50
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
53
51
54
52
55
58
56
59
57
5a
5d
5b
5c
58
59
5a
56
57
53
54
55
51
52
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4c
4b
45
44
49
49
4e
4e
55
5d
5f
67
69
71
78
7b
83
85
8d
94
97
9e
a1
a8
b0
b3
af
a6
a3
9f
97
93
8b
87
84
7b
77
6f
6b
68
5f
5c
53
50
4d
45
42
3a
41
48
4a
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4f
52
55
53
55
53
56
59
57
59
57
5a
5d
5b
5d
5b
5e
61
5f
61
5f
62
65
63
65
63
66
69
67
68
64
65
66
63
64
60
61
62
5f
60
5c
5d
5e
5b
5c
58
59
5a
57
58
54
55
56
53
54
50
51
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4f
52
55
53
56
54
57
5a
58
5b
59
5c
5d
59
5a
56
57
58
54
55
51
52
53
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
4d
4c
46
45
45
4a
4f
4f
56
59
60
68
6a
72
74
7c
84
86
8e
90
98
9f
a2
a9
ac
b4
b0
a7
a4
9b
98
94
8c
88
80
7c
78
70
6c
64
60
5d
54
51
49
46
43
3b
42
44
4b
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
50
53
51
54
56
54
57
55
58
5a
58
5b
59
5c
5e
5c
5f
5d
60
62
60
63
61
64
66
64
67
65
68
69
65
66
62
64
65
61
62
5e
60
61
5d
5e
5a
5c
5d
59
5a
56
58
59
55
56
52
54
55
51
52
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
50
53
51
54
57
55
58
56
59
5c
5a
5d
59
5a
5b
57
58
54
55
56
52
53
4f
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
4e
48
47
46
46
4b
4b
50
57
5a
61
64
6b
73
75
7d
80
87
8f
91
99
9b
a3
aa
ad
b5
ac
a8
a5
9c
99
90
8d
89
81
7d
74
71
6d
65
61
59
55
52
4a
47
3f
3c
43
45
4c
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
51
4e
50
52
4f
