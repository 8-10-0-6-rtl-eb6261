041
042
048
049
04A
051
052
058
059
05A
061
062
068
069
06A
228
102
108
109
10A
111
112
118
119
11A
121
122
128
129
12A
131
132
241
242
248
249
24A
251
252
258
259
25A
261
262
268
269
26A
22A
141
142
148
149
14A
151
152
158
159
15A
161
162
168
169
16A
229
064
065
066
06C
164
165
166
16C
144
145
146
14C
14D
154
155
156
104
105
106
10C
10D
114
115
116
124
125
126
12C
12D
134
135
136
204
205
206
20C
20D
214
215
216
224
225
226
22C
22D
234
235
236
044
045
046
04C
04D
054
055
056
244
245
246
24C
24D
254
255
256
081
082
088
089
08A
091
092
098
099
0A1
0A2
0A8
0A9
0AA
0B1
0B2
181
182
188
189
18A
191
192
198
199
1A1
1A2
1A8
1A9
1AA
1B1
1B2
281
282
288
289
28A
291
292
298
299
2A1
2A2
2A8
2A9
2AA
2B1
2B2
0C1
0C2
0C8
0C9
0CA
0D1
0D2
0D8
0D9
2C1
2C2
2C8
2C9
2CA
2D1
2D2
084
085
086
08C
08D
094
095
096
0A4
0A5
0A6
0AC
0AD
0B4
0B5
0B6
184
185
186
18C
18D
194
195
196
1A4
1A5
1A6
1AC
1AD
1B4
1B5
1B6
284
285
286
28C
28D
294
295
296
2A4
2A5
2A6
2AC
2AD
2B4
2B5
2B6
0C4
0C5
0C6
0CC
0CD
0D4
0D5
0D6
2C4
2C5
2C6
2CC
2CD
2D4
2D5
2D6
