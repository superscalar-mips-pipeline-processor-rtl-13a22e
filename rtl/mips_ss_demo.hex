// Default program of the instruction memory, one 32-bit word per line,
// word 0 first. Pairs are (word 2k, word 2k+1).
20100000  // addi $s0, $0, 0
20090021  // addi $t1, $0, 33
12000003  // beq  $s0, $0, label
20100001  // addi $s0, $0, 1      (second slot, executes)
2008004d  // addi $t0, $0, 77     (skipped)
200a004d  // addi $t2, $0, 77     (skipped)
ac100050  // label: sw $s0, 80($0)
01304020  // add  $t0, $t1, $s0
8c0b0050  // lw   $t3, 80($0)
200c0007  // addi $t4, $0, 7
01686820  // add  $t5, $t3, $t0  (load-use stall)
010c7022  // sub  $t6, $t0, $t4
0800000c  // done: j done
00000000  // nop
