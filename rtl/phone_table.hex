// Phone number of each registered user, five DTMF digit codes (key 0 = A), same order
// as the PIN table.
564A7
59872
59873
52897
00000
00000
00000
00000
00000
00000
00000
00000
00000
00000
00000
00000
