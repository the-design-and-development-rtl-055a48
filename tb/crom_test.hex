A5C3
B694
836D
9FC6
E89F
C570
D1C9
22A2
3F7B
0BCC
64A5
717E
4DD7
5EA8
AB01
87DA
90B3
ED04
F9DD
CAB6
270F
33E0
0CB9
1912
75EB
46BC
5315
AFEE
B847
9518
E1F1
F24A
