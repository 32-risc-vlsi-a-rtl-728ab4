// tb_decoder: decodes one instance of every implemented instruction and
// checks class, ALU/SAU operation, register write, condition-code update,
// privilege, cycle count and memory size; unused op codes must be illegal.
module tb_decoder;
  import erisc_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] ir; ctrl_t c;
  decoder dut (.ir(ir), .c(c));
  int checks = 0, failures = 0;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic t(string s, logic [31:0] w, iclass_e cls, int alu, bit wr, bit cc, bit pv, int nc, bit ill);
    ir = w; #1;
    checks++;
    if (c.cls !== cls || (alu >= 0 && c.alu_op !== alu_op_e'(alu)) || c.wr_rd !== wr ||
        c.set_cc !== cc || c.priv !== pv || c.ncycles !== 2'(nc) || c.illegal !== ill) begin
      failures++; $display("FAIL %s: cls=%s alu=%s wr=%b cc=%b priv=%b nc=%0d ill=%b", s,
        c.cls.name(), c.alu_op.name(), c.wr_rd, c.set_cc, c.priv, c.ncycles, c.illegal);
    end
  endtask
  initial begin
    t("add",    alu_r(ADD, 1, 2, 3),    C_ALU, ALU_ADD, 1, 0, 0, 0, 0);
    t("addcc",  alu_r(ADDCC, 1, 2, 3),  C_ALU, ALU_ADD, 1, 1, 0, 0, 0);
    t("sub",    alu_r(SUB, 1, 2, 3),    C_ALU, ALU_SUB, 1, 0, 0, 0, 0);
    t("subcc",  alu_i(SUBCC, 0, 2, 3),  C_ALU, ALU_SUB, 1, 1, 0, 0, 0);
    t("orcc",   alu_r(ORCC, 1, 2, 3),   C_ALU, ALU_OR, 1, 1, 0, 0, 0);
    t("xor",    alu_r(XOR, 1, 2, 3),    C_ALU, ALU_XOR, 1, 0, 0, 0, 0);
    t("addx",   alu_r(ADDX, 1, 2, 3),   C_ALU, ALU_ADDX, 1, 0, 0, 0, 0);
    t("subxcc", alu_r('h1C, 1, 2, 3),   C_ALU, ALU_SUBX, 1, 1, 0, 0, 0);
    t("andn",   alu_i(ANDN, 1, 2, 5),   C_ALU, ALU_ANDN, 1, 0, 0, 0, 0);
    t("xnorcc", alu_i('h17, 1, 2, 5),   C_ALU, ALU_XNOR, 1, 1, 0, 0, 0);
    t("taddcctv", alu_r(TADDCCTV, 1, 2, 3), C_ALU, ALU_TADD, 1, 1, 0, 0, 0);
    t("mulscc", alu_r(MULSCC, 1, 2, 3), C_ALU, ALU_MULS, 1, 1, 0, 0, 0);
    t("sra",    alu_i(SRA, 1, 2, 3),    C_SHIFT, -1, 1, 0, 0, 0, 0);
    t("rdy",    alu_r(RDY, 1, 0, 0),    C_RDSPR, ALU_PASSB, 1, 0, 0, 0, 0);
    t("rdpsr",  alu_r(RDPSR, 1, 0, 0),  C_RDSPR, ALU_PASSB, 1, 0, 1, 0, 0);
    t("wrwim",  alu_i(WRWIM, 0, 1, 0),  C_WRSPR, ALU_XOR, 0, 0, 1, 0, 0);
    t("wry",    alu_i(WRY, 0, 1, 0),    C_WRSPR, ALU_XOR, 0, 0, 0, 0, 0);
    t("jmpl",   alu_i(JMPL, 15, 1, 0),  C_JMPL, -1, 1, 0, 0, 1, 0);
    t("rett",   alu_i(RETT, 0, 1, 0),   C_RETT, -1, 0, 0, 1, 1, 0);
    t("ticc",   ticc(BA, 0, 3),         C_TICC, -1, 0, 0, 0, 0, 0);
    t("save",   alu_r(SAVE, 1, 2, 3),   C_SAVE, ALU_ADD, 1, 0, 0, 1, 0);
    t("restore",alu_r(RESTORE, 1, 2, 3),C_RESTORE, ALU_ADD, 1, 0, 0, 1, 0);
    t("ld",     mem_i(LD, 1, 2, 4),     C_LOAD, ALU_ADD, 1, 0, 0, 1, 0);
    t("ldsh",   mem_i(LDSH, 1, 2, 4),   C_LOAD, ALU_ADD, 1, 0, 0, 1, 0);
    checks++; if (c.sau_op !== SAU_LDSH || c.size !== 1) failures++;
    t("stb",    mem_i(STB, 1, 2, 4),    C_STORE, ALU_ADD, 0, 0, 0, 1, 0);
    checks++; if (c.size !== 0) failures++;
    t("sethi",  sethi(3, 'h12345400),   C_SETHI, ALU_PASSB, 1, 0, 0, 0, 0);
    t("bicc",   bicc(BNE, 1, 0, 64),    C_BRANCH, -1, 0, 0, 0, 0, 0);
    checks++; if (c.cond !== 4'(BNE) || c.annul !== 1) failures++;
    t("call",   call(0, 256),           C_CALL, ALU_PASSB, 1, 0, 0, 0, 0);
    t("unimp",  32'h0000_0000,          C_NOP, -1, 0, 0, 0, 0, 1);
    t("op3 2e", alu_r('h2E, 1, 2, 3),   C_ALU, -1, 0, 0, 0, 0, 1);
    t("ldd",    mem_i('h03, 1, 2, 0),   C_NOP, -1, 0, 0, 0, 0, 1);
    t("fpop",   alu_r(FPOP1, 0, 0, 0),  C_NOP, -1, 0, 0, 0, 0, 0);
    checks++; if (c.fpop !== 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
