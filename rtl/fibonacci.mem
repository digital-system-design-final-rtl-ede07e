// Fibonacci: r15 shows 0, 1, 1, 2, 3, 5, ... (55 is the 11th value)
2000  // 0: load 0 0        first variable
2201  // 1: load 1 1        second variable
2400  // 2: load 2 0        constant 0
01E0  // 3: mov 0 15        show the current number
4020  // 4: alu 0 1 add
6800  // 5: save_alu 4      r4 = r0 + r1
0200  // 6: mov 1 0         first  = second
0820  // 7: mov 4 1         second = sum
A403  // 8: branch_if_zero 2 3   r2 is 0: always back to 3
E000  // 9: end             not reached
