// tb_erisc_top: end-to-end test of the integer unit at its default size.
// A test program is assembled into the ROM of the 32K x 32 ROM / 32K x 32
// RAM test system; it exercises ALU operations with both bypass paths,
// carry, shifts, branches that read the condition codes from the ALU and
// from the PSR, annulled delay slots, every load/store size, the MULScc
// multiply loop, nested calls with window overflow and underflow traps,
// illegal / fp-disabled / misaligned / software / data-access /
// instruction-access / tag-overflow traps (the last one checks that the
// special registers were rolled back), an external interrupt (INTACK must
// follow IRL by five cycles, the first handler instruction by seven) and
// a bubble sort of 8 words. Results written to RAM are compared with values
// computed here; internal signals are watched to count how often each
// pipeline mechanism happened.
module tb_erisc_top;
  import tb_asm_pkg::*;

  localparam int RAM = 'h20000;

  logic clk = 1'b0, rst = 1'b1;
  logic [23:0] bus_addr;
  logic bus_rd, bus_we, bus_inst, intack, error_mode, fpu_inst_valid;
  logic [3:0] bus_be;
  logic [31:0] bus_wdata, bus_rdata, fpu_inst;
  logic inst_fault, data_fault, fp_exc;
  logic [3:0] irl;

  erisc_top dut (
    .clk(clk), .rst(rst), .bus_addr(bus_addr), .bus_rd(bus_rd), .bus_we(bus_we),
    .bus_be(bus_be), .bus_wdata(bus_wdata), .bus_inst(bus_inst), .bus_rdata(bus_rdata),
    .inst_fault(inst_fault), .data_fault(data_fault), .irl(irl), .intack(intack),
    .error_mode(error_mode), .fpu_inst_valid(fpu_inst_valid), .fpu_inst(fpu_inst),
    .fp_exc(fp_exc));

  tb_mem mem (.clk(clk), .addr(bus_addr), .we(bus_we), .be(bus_be), .wdata(bus_wdata),
              .rdata(bus_rdata));

  assign inst_fault = bus_inst && bus_addr == 24'h005000;
  assign data_fault = !bus_inst && (bus_rd || bus_we) && bus_addr == 24'(RAM + 'h7F0);
  assign fp_exc = 1'b0;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  // ---------------- program assembly (two passes for labels) ----------
  int pc;
  int lbl [32];
  task automatic emit(logic [31:0] w);
    mem.rom[pc >> 2] = w;
    pc += 4;
  endtask
  task automatic li(int rd, int v);
    emit(sethi(rd, v));
    emit(alu_i(OR, rd, rd, v & 'h3FF));
  endtask
  task automatic at(int addr); pc = addr; endtask

  localparam int G0=0,G1=1,G2=2,G3=3,G4=4,G5=5,G6=6,O0=8,O1=9,O2=10,O3=11,O4=12,O5=13,
                 O7=15,L0=16,L1=17,L2=18,L3=19,L4=20,L5=21,L6=22,L7=23,
                 I0=24,I1=25,I2=26,I3=27,I4=28,I5=29,I7=31;
  localparam int MUL_A = 'h00012345, MUL_B = 'h00056789;
  localparam int V1 = 'h12345678, V2 = 'h0F0F0F0F, V3 = 'h8899AABB;

  task automatic skip_handler(int tt);
    at('h1000 + tt * 16);
    emit(alu_i(ADD, G5, G5, 1));
    emit(alu_i(JMPL, 0, L2, 0));
    emit(alu_i(RETT, 0, L2, 4));
  endtask

  task automatic assemble();
    // trap table at 0x1000
    skip_handler('h02); skip_handler('h04); skip_handler('h07);
    skip_handler('h09); skip_handler('h85);
    at('h1010);                                   // instruction access fault
    emit(alu_i(ADD, G5, G5, 1));
    emit(alu_i(JMPL, 0, I7, 8));
    emit(alu_i(RETT, 0, I7, 12));
    at('h1050);                                   // window overflow
    emit(alu_i(ADD, G4, G4, 1));
    emit(alu_i(WRWIM, 0, G0, 0));
    emit(alu_i(JMPL, 0, L1, 0));
    emit(alu_i(RETT, 0, L2, 0));
    at('h1060);                                   // window underflow
    emit(alu_i(ADD, G4, G4, 16));
    emit(alu_i(WRWIM, 0, G0, 0));
    emit(alu_i(JMPL, 0, L1, 0));
    emit(alu_i(RETT, 0, L2, 0));
    at('h10A0);                                   // tag overflow: save PSR, skip
    emit(alu_r(RDPSR, L3, 0, 0));
    emit(mem_i(ST, L3, G6, 'h100));
    emit(alu_i(JMPL, 0, L2, 0));
    emit(alu_i(RETT, 0, L2, 4));
    at('h1150);                                   // interrupt level 5: restart
    emit(alu_i(ADD, G3, G3, 1));
    emit(alu_i(JMPL, 0, L1, 0));
    emit(alu_i(RETT, 0, L2, 0));

    // subroutines
    at('h3000);                                   // SUB: o0 = f(o0)
    emit(alu_r(SAVE, 0, 0, 0));
    emit(alu_i(ADD, O0, I0, 1));
    emit(call(pc, 'h3100));
    emit(nop());
    emit(alu_r(ADD, I0, O0, I0));
    emit(alu_i(JMPL, 0, I7, 8));
    emit(alu_r(RESTORE, 0, 0, 0));
    at('h3100);                                   // SUB2
    emit(alu_r(SAVE, 0, 0, 0));
    emit(alu_r(ADD, I0, I0, I0));
    emit(alu_i(WRWIM, 0, G0, 1));
    emit(alu_i(JMPL, 0, I7, 8));
    emit(alu_r(RESTORE, 0, 0, 0));

    // main program
    at(0);
    emit(sethi(G1, 'h1000));
    emit(alu_i(WRTBR, 0, G1, 0));
    emit(sethi(G6, RAM));
    emit(alu_i(WRPSR, 0, G0, 'hA0));              // S=1 ET=1 PIL=0 CWP=0
    emit(nop()); emit(nop()); emit(nop());
    emit(alu_i(WRWIM, 0, G0, 0));
    emit(alu_r(OR, G3, 0, 0)); emit(alu_r(OR, G4, 0, 0)); emit(alu_r(OR, G5, 0, 0));
    // ALU and bypass
    li(G2, V1); li(O1, V2);
    emit(alu_r(ADD, O2, G2, O1));
    emit(alu_r(SUB, O3, O2, G2));
    emit(alu_r(XOR, O4, O2, O3));
    emit(alu_r(AND, O5, G2, O1));
    emit(alu_r(ANDN, L0, G2, O1));
    emit(alu_r(ORN, L1, G0, G2));
    emit(alu_r(XNOR, L2, G2, O1));
    emit(mem_i(ST, O2, G6, 0));  emit(mem_i(ST, O3, G6, 4));  emit(mem_i(ST, O4, G6, 8));
    emit(mem_i(ST, O5, G6, 12)); emit(mem_i(ST, L0, G6, 16)); emit(mem_i(ST, L1, G6, 20));
    emit(mem_i(ST, L2, G6, 24));
    emit(alu_i(SUBCC, L3, G0, 1));
    emit(alu_i(ADDX, L4, G0, 0));
    emit(mem_i(ST, L3, G6, 28)); emit(mem_i(ST, L4, G6, 32));
    emit(alu_i(SLL, L5, G2, 4));
    emit(alu_i(SRL, L6, G2, 8));
    emit(alu_i(OR, L7, G0, -256));
    emit(alu_i(SRA, L7, L7, 4));
    emit(mem_i(ST, L5, G6, 36)); emit(mem_i(ST, L6, G6, 40)); emit(mem_i(ST, L7, G6, 44));
    // branches
    emit(alu_r(SUBCC, G0, G2, O1));
    emit(bicc(BG, 0, pc, lbl[1]));
    emit(alu_i(ADD, I0, G0, 1));
    emit(alu_i(ADD, I0, G0, 99));
    lbl[1] = pc;
    emit(alu_r(SUBCC, G0, G0, G0));
    emit(nop());
    emit(bicc(BNE, 1, pc, lbl[2]));
    emit(alu_i(ADD, I0, I0, 10));
    emit(alu_i(ADD, I0, I0, 100));
    lbl[2] = pc;
    emit(bicc(BA, 1, pc, lbl[3]));
    emit(alu_i(ADD, I0, I0, 1000));
    emit(alu_i(ADD, I0, I0, 2000));
    lbl[3] = pc;
    emit(mem_i(ST, I0, G6, 48));
    // loads and stores
    li(I1, V3);
    emit(mem_i(ST, I1, G6, 52));
    emit(mem_i(LDUB, I2, G6, 53));
    emit(alu_i(ADD, I3, I2, 1));
    emit(mem_i(LDSB, I4, G6, 52));
    emit(mem_i(LDUH, I5, G6, 54));
    emit(mem_i(LDSH, O0, G6, 52));
    emit(mem_i(STB, I3, G6, 57));
    emit(mem_i(STH, I5, G6, 62));
    emit(mem_i(ST, I3, G6, 64)); emit(mem_i(ST, I4, G6, 68));
    emit(mem_i(ST, I5, G6, 72)); emit(mem_i(ST, O0, G6, 76));
    emit(mem_i(LD, O7, G6, 52));
    emit(mem_i(ST, O7, G6, 80));
    // multiply by MULScc steps
    li(O0, MUL_A); li(O1, MUL_B);
    emit(mem_i(ST, G0, G6, 'h1F0));
    emit(alu_i(WRY, 0, O0, 0));
    emit(alu_r(ANDCC, O4, G0, G0));
    repeat (32) emit(alu_r(MULSCC, O4, O4, O1));
    emit(alu_r(MULSCC, O4, O4, G0));
    emit(alu_r(RDY, O0, 0, 0));
    emit(mem_i(ST, G0, G6, 'h1F4));
    emit(mem_i(ST, O0, G6, 84)); emit(mem_i(ST, O4, G6, 88));
    // calls, windows
    emit(alu_i(WRWIM, 0, G0, 'h40));
    emit(alu_i(OR, O0, G0, 7));
    emit(call(pc, 'h3000));
    emit(nop());
    emit(mem_i(ST, O0, G6, 92));
    // traps
    emit(32'h0000_0000);                          // unimp
    emit(alu_r(FPOP1, 0, 0, 0));                  // fp disabled
    emit(mem_i(LD, O2, G6, 2));                   // misaligned
    emit(ticc(BA, G0, 5));                        // ta 5
    emit(mem_i(LD, O2, G6, 'h7F0));               // data access fault
    emit(alu_r(SUBCC, G0, G0, G0));
    emit(alu_i(OR, L4, G0, 1));
    emit(alu_r(TADDCCTV, L5, L4, G0));            // tag overflow
    emit(alu_i(SUBCC, G0, G0, 1));
    emit(call(pc, 'h5000));                       // instruction access fault
    emit(nop());
    emit(mem_i(ST, G5, G6, 96)); emit(mem_i(ST, G4, G6, 100));
    // interrupt
    emit(mem_i(ST, G0, G6, 'h1F8));
    repeat (16) emit(alu_i(ADD, G2, G2, 0));
    emit(mem_i(ST, G3, G6, 104));
    // bubble sort of 8 words at RAM + 0x400
    emit(alu_i(ADD, O0, G6, 'h400));
    emit(alu_i(OR, O1, G0, 7));
    lbl[4] = pc;                                  // outer
    emit(alu_r(OR, O2, G0, G0));
    emit(alu_r(OR, O3, O0, G0));
    lbl[5] = pc;                                  // inner
    emit(mem_i(LD, O4, O3, 0));
    emit(mem_i(LD, O5, O3, 4));
    emit(alu_r(SUBCC, G0, O4, O5));
    emit(bicc(BLE, 0, pc, lbl[6]));
    emit(nop());
    emit(mem_i(ST, O5, O3, 0));
    emit(mem_i(ST, O4, O3, 4));
    lbl[6] = pc;
    emit(alu_i(ADD, O3, O3, 4));
    emit(alu_i(ADD, O2, O2, 1));
    emit(alu_r(SUBCC, G0, O2, O1));
    emit(bicc(BL, 0, pc, lbl[5]));
    emit(nop());
    emit(alu_i(SUBCC, O1, O1, 1));
    emit(bicc(BG, 0, pc, lbl[4]));
    emit(nop());
    emit(mem_i(ST, G0, G6, 'h1FC));               // done
    emit(bicc(BA, 0, pc, pc));
    emit(nop());
  endtask

  // ---------------- mechanism counters --------------------------------
  int n_byp_e, n_byp_w, n_evl1, n_evl2, n_annul, n_multi, n_qfull, n_mismatch, n_early,
      n_dstall, n_rollback, n_int, n_loads, n_stores;
  int n_tt [256];
  int t_irl = -1, t_intack = -1, t_mul0 = -1, t_mul1 = -1, t_hnd = -1;
  bit done = 0;

  always @(posedge clk) if (!rst) begin
    cycle++;
    if (dut.iss.valid && dut.mat[0]) n_byp_e++;
    if (dut.iss.valid && dut.mat[1] && !dut.mat[0]) n_byp_w++;
    if (dut.d_live && dut.d_leave && dut.dc.cls == erisc_pkg::C_BRANCH) begin
      if (dut.cc_set) n_evl2++; else n_evl1++;
    end
    if (dut.d_valid && dut.d_squash) n_annul++;
    if (dut.d_valid && dut.seq != 0) n_multi++;
    if (dut.q_count == 2) n_qfull++;
    if (dut.mismatch) n_mismatch++;
    if (dut.early) n_early++;
    if (dut.data_ld || dut.data_st) n_dstall++;
    if (dut.data_ld) n_loads++;
    if (dut.data_st) n_stores++;
    if (dut.trap_go) begin
      n_tt[dut.trap_tt]++;
      if (dut.u_spr.psr != dut.u_spr.psr_b) n_rollback++;
    end
    if (intack) begin n_int++; if (t_intack < 0) t_intack = cycle; end
    if (irl != 0 && t_irl < 0) t_irl = cycle;
    if (dut.d_take && dut.nxt_pc == 32'h1150 && t_hnd < 0) t_hnd = cycle;
    if (bus_we && bus_addr == 24'(RAM + 'h1F0)) t_mul0 = cycle;
    if (bus_we && bus_addr == 24'(RAM + 'h1F4)) t_mul1 = cycle;
    if (bus_we && bus_addr == 24'(RAM + 'h1FC)) done = 1;
    if (error_mode) begin failures++; $display("FAIL: error mode at cycle %0d", cycle); done = 1; end
  end

  // interrupt source: raise IRL = 5 after the marker store, drop on INTACK
  always @(posedge clk) begin
    if (rst) irl <= 4'd0;
    else if (bus_we && bus_addr == 24'(RAM + 'h1F8)) irl <= 4'd5;
    else if (intack) irl <= 4'd0;
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sortin [8];
  int sorted [8];
  longint prod;
  initial begin
    for (int i = 0; i < 256; i++) n_tt[i] = 0;
    for (int i = 0; i < 32; i++) lbl[i] = 0;
    assemble();
    assemble();                                   // second pass resolves labels
    for (int i = 0; i < 8; i++) begin
      sortin[i] = int'($urandom_range(0, 2000)) - 1000;
      mem.ram['h100 + i] = sortin[i];
      sorted[i] = sortin[i];
    end
    for (int i = 0; i < 8; i++)                   // reference: signed ascending order
      for (int j = 0; j < 7 - i; j++)
        if (sorted[j] > sorted[j+1]) begin int t; t = sorted[j]; sorted[j] = sorted[j+1]; sorted[j+1] = t; end
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (done);
    repeat (5) @(posedge clk);

    check("add",  mem.ram[0], V1 + V2);
    check("sub bypass", mem.ram[1], V2);
    check("xor bypass", mem.ram[2], (V1 + V2) ^ V2);
    check("and",  mem.ram[3], V1 & V2);
    check("andn", mem.ram[4], V1 & ~V2);
    check("orn",  mem.ram[5], ~V1);
    check("xnor", mem.ram[6], ~(V1 ^ V2));
    check("subcc", mem.ram[7], 32'hFFFF_FFFF);
    check("addx carry", mem.ram[8], 1);
    check("sll",  mem.ram[9], V1 << 4);
    check("srl",  mem.ram[10], V1 >> 8);
    check("sra",  mem.ram[11], 32'hFFFF_FFF0);
    check("branches/annul", mem.ram[12], 101);
    check("st word", mem.ram[13], V3);
    check("stb", mem.ram[14], 32'h009A_0000);
    check("sth", mem.ram[15], 32'h0000_AABB);
    check("ldub+use", mem.ram[16], 32'h9A);
    check("ldsb", mem.ram[17], 32'hFFFF_FF88);
    check("lduh", mem.ram[18], 32'h0000_AABB);
    check("ldsh", mem.ram[19], 32'hFFFF_8899);
    check("ld",   mem.ram[20], V3);
    prod = longint'(MUL_A) * longint'(MUL_B);
    check("mul low",  mem.ram[21], prod[31:0]);
    check("mul high", mem.ram[22], prod[63:32]);
    check("call/save/restore", mem.ram[23], 23);
    check("skip-type traps", mem.ram[24], 6);
    check("window traps", mem.ram[25], 17);
    check("interrupts", mem.ram[26], 1);
    check("rolled-back icc", mem.ram['h40][23:20], 4'b0100);
    for (int i = 0; i < 8; i++) check($sformatf("sort[%0d]", i), mem.ram['h100 + i], sorted[i]);
    checks++;
    if (t_intack - t_irl != 5) begin
      failures++; $display("FAIL: INTACK %0d cycles after IRL, expected 5", t_intack - t_irl);
    end
    checks++;
    // first handler instruction in decode 7 cycles after IRL (the interrupt
    // here meets only single-cycle instructions)
    if (t_hnd - t_irl != 7) begin
      failures++; $display("FAIL: handler reached decode %0d cycles after IRL, expected 7", t_hnd - t_irl);
    end
    checks++;
    // 32-bit multiply: about 2.0 us at 20 MHz including operand set-up
    if (t_mul1 - t_mul0 < 34 || t_mul1 - t_mul0 > 45) begin
      failures++; $display("FAIL: multiply took %0d cycles", t_mul1 - t_mul0);
    end
    foreach (n_tt[i]) if (i inside {1,2,4,5,6,7,9,'h0A,'h15,'h85}) begin
      checks++;
      if (n_tt[i] == 0) begin failures++; $display("FAIL: trap type %02h never taken", i); end
    end
    begin
      int m [string];
      m["bypass from EXE"] = n_byp_e; m["bypass from WB"] = n_byp_w;
      m["branch on PSR codes (EVL1)"] = n_evl1; m["branch on ALU codes (EVL2)"] = n_evl2;
      m["annulled delay slot"] = n_annul; m["multi-cycle pseudo-cycle"] = n_multi;
      m["prefetch queue full"] = n_qfull;
      m["taken transfer, no bubble"] = n_early; m["fetch held by data access"] = n_dstall;
      m["special register rollback"] = n_rollback; m["interrupt acknowledge"] = n_int;
      foreach (m[k]) begin
        checks++;
        $display("mechanism %-28s %0d", k, m[k]);
        if (m[k] == 0) begin failures++; $display("FAIL: %s never happened", k); end
      end
    end
    $display("fetch redirects on address mismatch: %0d", n_mismatch);
    $display("cycles=%0d loads=%0d stores=%0d multiply=%0d cycles intack_latency=%0d handler_latency=%0d",
             cycle, n_loads, n_stores, t_mul1 - t_mul0, t_intack - t_irl, t_hnd - t_irl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
