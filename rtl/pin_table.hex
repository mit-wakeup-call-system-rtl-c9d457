// PIN of each registered user, four DTMF digit codes (key 0 = A).
// An entry of 0000 is an empty slot (no key produces code 0).
1234
9A7A
5555
2468
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
