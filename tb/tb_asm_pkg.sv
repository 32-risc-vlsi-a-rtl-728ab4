// tb_asm_pkg: instruction encoders used by the testbenches to build SPARC
// V7 integer programs in memory. Register numbers: %g0-%g7 = 0-7,
// %o0-%o7 = 8-15, %l0-%l7 = 16-23, %i0-%i7 = 24-31.
package tb_asm_pkg;
  function automatic logic [31:0] f3r(int op, int rd, int op3, int rs1, int rs2);
    return {2'(op), 5'(rd), 6'(op3), 5'(rs1), 1'b0, 8'h00, 5'(rs2)};
  endfunction
  function automatic logic [31:0] f3i(int op, int rd, int op3, int rs1, int simm);
    return {2'(op), 5'(rd), 6'(op3), 5'(rs1), 1'b1, 13'(simm)};
  endfunction
  // arithmetic / logic, register and immediate forms
  function automatic logic [31:0] alu_r(int op3, int rd, int rs1, int rs2);
    return f3r(2, rd, op3, rs1, rs2);
  endfunction
  function automatic logic [31:0] alu_i(int op3, int rd, int rs1, int simm);
    return f3i(2, rd, op3, rs1, simm);
  endfunction
  localparam int ADD = 'h00, AND = 'h01, OR = 'h02, XOR = 'h03, SUB = 'h04,
                 ANDN = 'h05, ORN = 'h06, XNOR = 'h07, ADDX = 'h08, SUBX = 'h0C,
                 ADDCC = 'h10, ANDCC = 'h11, ORCC = 'h12, SUBCC = 'h14, ADDXCC = 'h18,
                 TADDCC = 'h20, TADDCCTV = 'h22, MULSCC = 'h24, SLL = 'h25, SRL = 'h26, SRA = 'h27,
                 RDY = 'h28, RDPSR = 'h29, RDWIM = 'h2A, RDTBR = 'h2B,
                 WRY = 'h30, WRPSR = 'h31, WRWIM = 'h32, WRTBR = 'h33, FPOP1 = 'h34,
                 JMPL = 'h38, RETT = 'h39, TICC = 'h3A, SAVE = 'h3C, RESTORE = 'h3D;
  localparam int LD = 'h00, LDUB = 'h01, LDUH = 'h02, ST = 'h04, STB = 'h05, STH = 'h06,
                 LDSB = 'h09, LDSH = 'h0A;
  localparam int BN = 0, BE = 1, BLE = 2, BL = 3, BLEU = 4, BCS = 5, BNEG = 6, BVS = 7,
                 BA = 8, BNE = 9, BG = 10, BGE = 11, BGU = 12, BCC = 13, BPOS = 14, BVC = 15;

  function automatic logic [31:0] mem_i(int op3, int rd, int rs1, int simm);
    return f3i(3, rd, op3, rs1, simm);
  endfunction
  function automatic logic [31:0] sethi(int rd, int value);
    return {2'b00, 5'(rd), 3'b100, 22'(value >> 10)};
  endfunction
  function automatic logic [31:0] nop();
    return 32'h0100_0000;
  endfunction
  function automatic logic [31:0] bicc(int cond, bit a, int from_pc, int to_pc);
    return {2'b00, a, 4'(cond), 3'b010, 22'((to_pc - from_pc) >>> 2)};
  endfunction
  function automatic logic [31:0] call(int from_pc, int to_pc);
    return {2'b01, 30'((to_pc - from_pc) >>> 2)};
  endfunction
  function automatic logic [31:0] ticc(int cond, int rs1, int imm);
    return f3i(2, cond, TICC, rs1, imm);
  endfunction
endpackage
