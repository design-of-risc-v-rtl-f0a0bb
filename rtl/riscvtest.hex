// Test program: one 32-bit instruction word per line, from address 0.
// Expected: word 100 = 25, word 96 = 7, word 108 = 0x12345, word 104 never written.
00500113  // 0000 addi x2, x0, 5
00c00193  // 0004 addi x3, x0, 12
ff718393  // 0008 addi x7, x3, -9
0023e233  // 000c or   x4, x7, x2
0041f2b3  // 0010 and  x5, x3, x4
004282b3  // 0014 add  x5, x5, x4
04728863  // 0018 beq  x5, x7, wrong
0041a233  // 001c slt  x4, x3, x4
00020463  // 0020 beq  x4, x0, around
00000293  // 0024 addi x5, x0, 0
0023a233  // 0028 slt  x4, x7, x2
005203b3  // 002c add  x7, x4, x5
402383b3  // 0030 sub  x7, x7, x2
0471aa23  // 0034 sw   x7, 84(x3)
06002103  // 0038 lw   x2, 96(x0)
005104b3  // 003c add  x9, x2, x5
0074c533  // 0040 xor  x10, x9, x7
004515b3  // 0044 sll  x11, x10, x4
0045d633  // 0048 srl  x12, x11, x4
00a61e63  // 004c bne  x12, x10, wrong
00064c63  // 0050 blt  x12, x0, wrong
00c05a63  // 0054 bge  x0, x12, wrong
123456b7  // 0058 lui  x13, 0x12345
00c6d693  // 005c srli x13, x13, 12
014001ef  // 0060 jal  x3, end
00100113  // 0064 addi x2, x0, 1
00100713  // 0068 addi x14, x0, 1
06e02423  // 006c sw   x14, 104(x0)
fe000ce3  // 0070 beq  x0, x0, wrong
00910133  // 0074 add  x2, x2, x9
06202223  // 0078 sw   x2, 100(x0)
06d02623  // 007c sw   x13, 108(x0)
028187e7  // 0080 jalr x15, 40(x3)
00000113  // 0084 addi x2, x0, 0
fe0000e3  // 0088 beq  x0, x0, wrong
00210063  // 008c beq  x2, x2, done
