// Sum of 1..10: leaves 55 (0x37) in data word 0, then spins on a jump-to-self.
00a00093
00000113
00110133
fff08093
fe009ce3
00202023
0000006f
