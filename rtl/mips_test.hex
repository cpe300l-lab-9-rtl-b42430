20020005  // 00: addi $2, $0, 5
2003000c  // 04: addi $3, $0, 12
2067fff7  // 08: addi $7, $3, -9
00e22025  // 0c: or $4, $7, $2
00642824  // 10: and $5, $3, $4
00a42820  // 14: add $5, $5, $4
10a7000a  // 18: beq $5, $7, end
0064202a  // 1c: slt $4, $3, $4
10800001  // 20: beq $4, $0, around
20050000  // 24: addi $5, $0, 0
00e2202a  // 28: slt $4, $7, $2
00853820  // 2c: add $7, $4, $5
00e23822  // 30: sub $7, $7, $2
ac670044  // 34: sw $7, 68($3)
8c020050  // 38: lw $2, 80($0)
08000011  // 3c: j end
20020001  // 40: addi $2, $0, 1
ac020054  // 44: sw $2, 84($0)
