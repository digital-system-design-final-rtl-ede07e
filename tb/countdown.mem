// Countdown: r0 goes 5, 4, ... 0 on the display, then the program ends
2005  // 0: load 0 5
2201  // 1: load 1 1
2400  // 2: load 2 0
01E0  // 3: mov 0 15        show r0
A008  // 4: branch_if_zero 0 8   done when r0 is 0
4021  // 5: alu 0 1 sub
6000  // 6: save_alu 0      r0 = r0 - 1
A403  // 7: branch_if_zero 2 3   r2 is 0: always back to 3
E000  // 8: end
