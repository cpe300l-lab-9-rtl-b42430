2008fffe  // 00: addi $8, $0, -2
20090003  // 04: addi $9, $0, 3
01095027  // 08: nor $10, $8, $9
01095826  // 0c: xor $11, $8, $9
0128602b  // 10: sltu $12, $9, $8
0128682a  // 14: slt $13, $9, $8
01097021  // 18: addu $14, $8, $9
01287823  // 1c: subu $15, $9, $8
ac0a0000  // 20: sw $10, 0($0)
ac0b0004  // 24: sw $11, 4($0)
ac0c0008  // 28: sw $12, 8($0)
ac0d000c  // 2c: sw $13, 12($0)
ac0e0010  // 30: sw $14, 16($0)
ac0f0014  // 34: sw $15, 20($0)
2010ffe0  // 38: addi $16, $0, -32
a0100021  // 3c: sb $16, 33($0)
2011edcc  // 40: addi $17, $0, -4660
a4110026  // 44: sh $17, 38($0)
8c120020  // 48: lw $18, 32($0)
8c130024  // 4c: lw $19, 36($0)
80140021  // 50: lb $20, 33($0)
90150021  // 54: lbu $21, 33($0)
84160026  // 58: lh $22, 38($0)
94170026  // 5c: lhu $23, 38($0)
80180027  // 60: lb $24, 39($0)
ac120028  // 64: sw $18, 40($0)
ac13002c  // 68: sw $19, 44($0)
ac140030  // 6c: sw $20, 48($0)
ac150034  // 70: sw $21, 52($0)
ac160038  // 74: sw $22, 56($0)
ac17003c  // 78: sw $23, 60($0)
ac180040  // 7c: sw $24, 64($0)
08000020  // 80: j end
