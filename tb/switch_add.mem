// Switch calculator: add two switch readings, then compare them
8200  // 0: load_input 1
8400  // 1: load_input 2
4240  // 2: alu 1 2 add
7E00  // 3: save_alu 15     show r1 + r2
4242  // 4: alu 1 2 eq
7E00  // 5: save_alu 15     show 1 if equal, else 0
C000  // 6: opcode 110, no operation
E000  // 7: end
