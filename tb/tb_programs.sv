// tb_programs: runs two of the classic benchmark programs for this kind of
// controller on the full-size core, in the 32K x 32 ROM / 32K x 32 RAM test
// system, and checks their results against models computed here.
//   1. Tower of Hanoi, recursive, 8 discs (255 moves). Every level of the
//      recursion is a SAVE/RESTORE call, so with 8 windows the recursion
//      runs out of windows: the window overflow handler spills the oldest
//      window to its stack frame and the underflow handler fills it back,
//      rotating WIM as a real run-time system does. Each move is stored as
//      (from << 4 | to) in a list that is compared with the reference
//      sequence.
//   2. 4 x 4 matrix product C = A * B of random 32-bit words (results
//      modulo 2^32), with a leaf multiply routine made of 33 MULScc steps.
// The problem sizes are this testbench's choice. Cycle counts, instruction
// counts and cycles per instruction of both programs are printed. Fails if a result differs, if the window traps
// never happen, on error mode or at the watchdog.
module tb_programs;
  import tb_asm_pkg::*;

  localparam int RAM = 'h20000;
  localparam int NDISC = 8;
  localparam int N = 4;
  localparam int MA = RAM + 'h100, MB = RAM + 'h200, MC = RAM + 'h300;
  localparam int MOVES = RAM + 'h400, STACK = RAM + 'h7000;

  logic clk = 1'b0, rst = 1'b1;
  logic [23:0] bus_addr;
  logic bus_rd, bus_we, bus_inst, intack, error_mode, fpu_inst_valid;
  logic [3:0] bus_be;
  logic [31:0] bus_wdata, bus_rdata, fpu_inst;

  erisc_top dut (
    .clk(clk), .rst(rst), .bus_addr(bus_addr), .bus_rd(bus_rd), .bus_we(bus_we),
    .bus_be(bus_be), .bus_wdata(bus_wdata), .bus_inst(bus_inst), .bus_rdata(bus_rdata),
    .inst_fault(1'b0), .data_fault(1'b0), .irl(4'd0), .intack(intack),
    .error_mode(error_mode), .fpu_inst_valid(fpu_inst_valid), .fpu_inst(fpu_inst),
    .fp_exc(1'b0));

  tb_mem mem (.clk(clk), .addr(bus_addr), .we(bus_we), .be(bus_be), .wdata(bus_wdata),
              .rdata(bus_rdata));

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
  task automatic mov(int rd, int rs); emit(alu_r(OR, rd, 0, rs)); endtask

  localparam int G0=0,G1=1,G2=2,G3=3,G4=4,G5=5,G6=6,G7=7,O0=8,O1=9,O2=10,O3=11,O4=12,
                 SP=14,O7=15,L0=16,L1=17,L2=18,L3=19,L4=20,L5=21,L6=22,L7=23,
                 I0=24,I1=25,I2=26,I3=27,I6=30,I7=31;

  task automatic assemble();
    // trap table entries (TBA = 0x1000): branch to the handler bodies
    at('h1050); emit(bicc(BA, 0, pc, 'h2000)); emit(nop());
    at('h1060); emit(bicc(BA, 0, pc, 'h2100)); emit(nop());
    // window overflow (trap window = the invalid one): spill the window below
    at('h2000);
    emit(alu_r(RDWIM, L3, 0, 0));
    mov(L7, G1);
    emit(alu_i(SRL, G1, L3, 1));
    emit(alu_i(SLL, L4, L3, 7));
    emit(alu_r(OR, G1, G1, L4));
    emit(alu_i(AND, G1, G1, 'hFF));
    emit(alu_r(SAVE, 0, 0, 0));
    emit(alu_i(WRWIM, 0, G1, 0));
    for (int r = 0; r < 8; r++) emit(mem_i(ST, L0 + r, SP, 4 * r));
    for (int r = 0; r < 8; r++) emit(mem_i(ST, I0 + r, SP, 32 + 4 * r));
    emit(alu_r(RESTORE, 0, 0, 0));
    mov(G1, L7);
    emit(alu_i(ADD, G4, G4, 1));
    emit(alu_i(JMPL, 0, L1, 0));
    emit(alu_i(RETT, 0, L2, 0));
    // window underflow: fill the window above the one returning
    at('h2100);
    emit(alu_r(RDWIM, L3, 0, 0));
    emit(alu_i(SLL, L4, L3, 1));
    emit(alu_i(SRL, L5, L3, 7));
    emit(alu_r(OR, L5, L5, L4));
    emit(alu_i(AND, L5, L5, 'hFF));
    emit(alu_i(WRWIM, 0, L5, 0));
    emit(nop()); emit(nop()); emit(nop());
    emit(alu_r(RESTORE, 0, 0, 0));
    emit(alu_r(RESTORE, 0, 0, 0));
    for (int r = 0; r < 8; r++) emit(mem_i(LD, L0 + r, SP, 4 * r));
    for (int r = 0; r < 8; r++) emit(mem_i(LD, I0 + r, SP, 32 + 4 * r));
    emit(alu_r(SAVE, 0, 0, 0));
    emit(alu_r(SAVE, 0, 0, 0));
    emit(alu_i(ADD, G5, G5, 1));
    emit(alu_i(JMPL, 0, L1, 0));
    emit(alu_i(RETT, 0, L2, 0));

    // hanoi(n = i0, from = i1, to = i2, via = i3)
    at('h3000);
    lbl[10] = pc;
    emit(alu_i(SAVE, SP, SP, -64));
    emit(alu_r(SUBCC, G0, I0, G0));
    emit(bicc(BE, 0, pc, lbl[11]));
    emit(nop());
    emit(alu_i(SUB, O0, I0, 1)); mov(O1, I1); mov(O2, I3); mov(O3, I2);
    emit(call(pc, lbl[10]));
    emit(nop());
    emit(alu_i(SLL, L0, I1, 4));
    emit(alu_r(OR, L0, L0, I2));
    emit(mem_i(ST, L0, G7, 0));
    emit(alu_i(ADD, G7, G7, 4));
    emit(alu_i(SUB, O0, I0, 1)); mov(O1, I3); mov(O2, I2); mov(O3, I1);
    emit(call(pc, lbl[10]));
    emit(nop());
    lbl[11] = pc;
    emit(alu_i(JMPL, 0, I7, 8));
    emit(alu_r(RESTORE, 0, 0, 0));

    // mul: o0 = o0 * o1 (low word), leaf routine
    at('h3100);
    lbl[12] = pc;
    emit(alu_i(WRY, 0, O0, 0));
    emit(alu_r(ANDCC, O4, G0, G0));
    repeat (32) emit(alu_r(MULSCC, O4, O4, O1));
    emit(alu_r(MULSCC, O4, O4, G0));
    emit(alu_r(RDY, O0, 0, 0));
    emit(alu_i(JMPL, 0, O7, 8));
    emit(nop());

    // main
    at(0);
    emit(sethi(G1, 'h1000));
    emit(alu_i(WRTBR, 0, G1, 0));
    emit(alu_i(WRPSR, 0, G0, 'hA0));              // S=1 ET=1 PIL=0 CWP=0
    emit(alu_i(WRWIM, 0, G0, 'h02));              // window 1 invalid
    emit(nop()); emit(nop()); emit(nop());
    mov(G4, G0); mov(G5, G0);
    li(SP, STACK);
    li(G7, MOVES);
    li(G6, RAM);
    emit(mem_i(ST, G0, G6, 'h1F0));               // start marker: hanoi
    emit(alu_i(OR, O0, G0, NDISC));
    emit(alu_i(OR, O1, G0, 1));
    emit(alu_i(OR, O2, G0, 3));
    emit(alu_i(OR, O3, G0, 2));
    emit(call(pc, lbl[10]));
    emit(nop());
    emit(mem_i(ST, G0, G6, 'h1F4));               // end marker: hanoi
    emit(mem_i(ST, G4, G6, 'h1E0));
    emit(mem_i(ST, G5, G6, 'h1E4));
    // matrix product
    li(G1, MA); li(G2, MB); li(G3, MC);
    emit(mem_i(ST, G0, G6, 'h1F8));               // start marker: matrix
    mov(L0, G0);
    lbl[13] = pc;                                 // i loop
    mov(L1, G0);
    lbl[14] = pc;                                 // j loop
    mov(L2, G0); mov(L3, G0);
    lbl[15] = pc;                                 // k loop
    emit(alu_i(SLL, L4, L0, 2));
    emit(alu_r(ADD, L4, L4, L2));
    emit(alu_i(SLL, L4, L4, 2));
    emit(alu_r(ADD, L4, L4, G1));
    emit(mem_i(LD, O0, L4, 0));
    emit(alu_i(SLL, L5, L2, 2));
    emit(alu_r(ADD, L5, L5, L1));
    emit(alu_i(SLL, L5, L5, 2));
    emit(alu_r(ADD, L5, L5, G2));
    emit(mem_i(LD, O1, L5, 0));
    emit(call(pc, lbl[12]));
    emit(nop());
    emit(alu_r(ADD, L3, L3, O0));
    emit(alu_i(ADD, L2, L2, 1));
    emit(alu_i(SUBCC, G0, L2, N));
    emit(bicc(BL, 0, pc, lbl[15]));
    emit(nop());
    emit(alu_i(SLL, L4, L0, 2));
    emit(alu_r(ADD, L4, L4, L1));
    emit(alu_i(SLL, L4, L4, 2));
    emit(alu_r(ADD, L4, L4, G3));
    emit(mem_i(ST, L3, L4, 0));
    emit(alu_i(ADD, L1, L1, 1));
    emit(alu_i(SUBCC, G0, L1, N));
    emit(bicc(BL, 0, pc, lbl[14]));
    emit(nop());
    emit(alu_i(ADD, L0, L0, 1));
    emit(alu_i(SUBCC, G0, L0, N));
    emit(bicc(BL, 0, pc, lbl[13]));
    emit(nop());
    emit(mem_i(ST, G0, G6, 'h1FC));               // done
    emit(bicc(BA, 0, pc, pc));
    emit(nop());
  endtask

  // ---------------- reference models ----------------------------------
  int ref_moves [$];
  function automatic void hanoi_ref(int n, int from, int to, int via);
    if (n == 0) return;
    hanoi_ref(n - 1, from, via, to);
    ref_moves.push_back(from * 16 + to);
    hanoi_ref(n - 1, via, to, from);
  endfunction

  // ---------------- monitors -------------------------------------------
  int t_h0 = -1, t_h1 = -1, t_m0 = -1, t_m1 = -1, n_ovf = 0, n_unf = 0;
  int n_inst = 0, i_h0 = 0, i_h1 = 0, i_m0 = 0, i_m1 = 0;   // instructions leaving decode
  bit done = 0;
  always @(posedge clk) if (!rst) begin
    cycle++;
    if (dut.d_live && dut.d_leave) n_inst++;
    if (dut.trap_go && dut.trap_tt == 8'h05) n_ovf++;
    if (dut.trap_go && dut.trap_tt == 8'h06) n_unf++;
    if (bus_we && bus_addr == 24'(RAM + 'h1F0)) begin t_h0 = cycle; i_h0 = n_inst; end
    if (bus_we && bus_addr == 24'(RAM + 'h1F4)) begin t_h1 = cycle; i_h1 = n_inst; end
    if (bus_we && bus_addr == 24'(RAM + 'h1F8)) begin t_m0 = cycle; i_m0 = n_inst; end
    if (bus_we && bus_addr == 24'(RAM + 'h1FC)) begin t_m1 = cycle; i_m1 = n_inst; done = 1; end
    if (error_mode) begin failures++; $display("FAIL: error mode at cycle %0d", cycle); done = 1; end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] a [N][N];
  logic [31:0] b [N][N];
  logic [31:0] c;
  initial begin
    for (int i = 0; i < 32; i++) lbl[i] = 0;
    assemble();
    assemble();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a[i][j] = $urandom; b[i][j] = $urandom;
        mem.ram[(MA - RAM) / 4 + i * N + j] = a[i][j];
        mem.ram[(MB - RAM) / 4 + i * N + j] = b[i][j];
      end
    hanoi_ref(NDISC, 1, 3, 2);
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (done);
    repeat (4) @(posedge clk);

    for (int m = 0; m < ref_moves.size(); m++)
      check($sformatf("hanoi move %0d", m), mem.ram[(MOVES - RAM) / 4 + m], 32'(ref_moves[m]));
    check("hanoi list end", mem.ram[(MOVES - RAM) / 4 + ref_moves.size()], 32'h0);
    check("overflow handler runs = overflow traps", mem.ram[(RAM + 'h1E0 - RAM) / 4], 32'(n_ovf));
    check("underflow handler runs = underflow traps", mem.ram[(RAM + 'h1E4 - RAM) / 4], 32'(n_unf));
    checks++;
    if (n_ovf == 0 || n_unf == 0) begin
      failures++; $display("FAIL: window traps never happened (%0d/%0d)", n_ovf, n_unf);
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        c = 0;
        for (int k = 0; k < N; k++) c += a[i][k] * b[k][j];
        check($sformatf("C[%0d][%0d]", i, j), mem.ram[(MC - RAM) / 4 + i * N + j], c);
      end
    $display("hanoi(%0d): %0d moves, %0d cycles, %0d instructions, CPI %0.2f, %0d window overflows, %0d underflows",
             NDISC, ref_moves.size(), t_h1 - t_h0, i_h1 - i_h0,
             real'(t_h1 - t_h0) / real'(i_h1 - i_h0), n_ovf, n_unf);
    $display("matrix %0dx%0d: %0d cycles, %0d instructions, CPI %0.2f", N, N, t_m1 - t_m0,
             i_m1 - i_m0, real'(t_m1 - t_m0) / real'(i_m1 - i_m0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
