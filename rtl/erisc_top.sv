// erisc_top: 32-bit embedded RISC integer unit (SPARC V7 integer subset,
// eight register windows, 136 registers).
//
// Pipeline: IF (fetch on the shared bus), DEC (decode, register read with
// bypass, branch evaluation, target calculation), EXE (ALU and shift/align
// unit side by side, address calculation, special register updates) and WB
// (register write; memory phase of loads and stores on the bus).
// Control is data stationary: the decoded control word travels with each
// instruction. Multi-cycle instructions stay in DEC while the 2-bit cycle
// counter counts their pseudo-cycles, each of which is issued to EXE as a
// pseudo-instruction:
//   load   : #1 address, #2 memory word aligned by the shift/align unit
//   store  : #1 address, #2 store data (read from rd); written on the bus
//            when #2 is in WB
//   JMPL   : #1 target, #2 link register write and control transfer
//   RETT   : #1 target and window/trap-state restore, #2 control transfer
//   SAVE / RESTORE : #1 add and window change, #2 empty slot so the next
//            instruction reads the new window
//   trap entry : #1 PC into %l1, #2 nPC into %l2 of the trap window.
// Branches are delayed (one delay slot, optional annul) and resolve in DEC
// using the dual branch evaluation circuit, so a taken branch costs no
// cycle when its delay slot is already fetched. Fetched instructions carry
// their address; decode accepts only the one it expects next, and anything
// else is discarded and fetching restarts at the right address.
// The prefetch queue keeps fetching while DEC works on multi-cycle
// instructions and feeds DEC while the bus carries a data access.
// Exceptions are carried to WB and taken one cycle later (precise,
// restartable). Interrupts: IRL sampled twice, attached to the next issued
// instruction, INTACK in the cycle the trap is taken.
//
// Bus: one access per cycle, address and control combinational from this
// cycle's state, read data expected in the same cycle (zero wait states),
// writes take effect on the rising edge. inst_fault / data_fault flag a
// failed access in the same cycle. Clock: one rising-edge clock stands for
// the two-phase clock; reset is synchronous, active high, and starts
// execution at address 0 in supervisor mode with traps disabled.
module erisc_top
  import erisc_pkg::*;
#(
  parameter int unsigned ADDR_W = 24,
  parameter int unsigned NREGS  = 136,
  parameter int unsigned QDEPTH = 2
) (
  input  logic              clk,
  input  logic              rst,
  // shared instruction/data bus
  output logic [ADDR_W-1:0] bus_addr,
  output logic              bus_rd,
  output logic              bus_we,
  output logic [3:0]        bus_be,
  output logic [31:0]       bus_wdata,
  output logic              bus_inst,
  input  logic [31:0]       bus_rdata,
  input  logic              inst_fault,
  input  logic              data_fault,
  // interrupts
  input  logic [3:0]        irl,
  output logic              intack,
  output logic              error_mode,
  // floating-point coprocessor interface (no coprocessor inside)
  output logic              fpu_inst_valid,
  output logic [31:0]       fpu_inst,
  input  logic              fp_exc
);

  // ------------------------------------------------------------------
  // pipeline registers
  // ------------------------------------------------------------------
  typedef struct packed {
    logic        valid;
    iclass_e     cls;
    logic [1:0]  seq;
    alu_op_e     alu_op;
    sau_op_e     sau_op;
    logic        use_sau;
    logic [31:0] a, b;
    logic        set_cc, tag_trap, ticc;
    logic        wr;
    logic [7:0]  wpa;
    spr_sel_e    spr;
    logic [1:0]  size;
    logic        fpop;
    logic        exc;
    logic [7:0]  tt;
    logic [31:0] pc, npc;
    logic [31:0] ir;
  } ex_t;

  typedef struct packed {
    logic        valid;
    iclass_e     cls;
    logic [1:0]  seq;
    logic [31:0] result;
    logic        wr;
    logic [7:0]  wpa;
    logic [1:0]  size;
    logic        exc;
    logic [7:0]  tt;
    logic [31:0] pc, npc;
  } wb_t;

  // decode stage
  logic        d_valid, d_squash, d_trapseq, d_first, d_ifault;
  logic [31:0] d_ir, d_pc, d_npc;
  logic [31:0] exp_pc, exp_npc;     // expected PC/nPC while DEC is empty
  ex_t         ex;
  wb_t         wb;
  logic [31:0] daddr;               // data address latched by load/store #1

  // ------------------------------------------------------------------
  // blocks
  // ------------------------------------------------------------------
  psr_t        psr;
  logic [7:0]  wim;
  logic [31:0] y, tbr;

  logic        trap_go, int_req, int_taken;
  logic [7:0]  trap_tt, int_tt;
  logic [31:0] trap_pc, trap_npc, vector;

  ctrl_t       dc;
  logic [31:0] imm;
  logic [29:0] disp;
  logic [1:0]  seq;
  logic        seq_last;

  logic [31:0] fa, br_target, npc_plus4;
  logic        fire, redirect;
  logic [31:0] redirect_pc;

  logic [31:0] q_ir, q_pc;
  logic        q_fault;
  logic [1:0]  q_count;
  logic        q_push, q_pop, q_flush;

  logic [4:0]  ra_sel;
  logic [31:0] rf_a, rf_b, op_a, op_b_reg;
  logic [7:0]  pa_a, pa_b;
  logic [3:0]  mat;

  logic [31:0] alu_res, y_next, sau_res, e_result;
  icc_t        alu_icc;
  logic        tag_ovf;

  logic        br_sel, br_annul;
  logic        data_ld, data_st;

  decoder u_dec (.ir(d_ir), .c(dc));
  imm_gen u_imm (.ir(d_ir), .imm(imm), .disp(disp));

  // ------------------------------------------------------------------
  // decode stage: register read and bypass
  // ------------------------------------------------------------------
  // store #2 reads the store data (rd) through port A
  assign ra_sel = (dc.cls == C_STORE && seq == 2'd0) ? d_ir[29:25] : d_ir[18:14];
  assign pa_a   = win_phys(psr.cwp, ra_sel);
  assign pa_b   = win_phys(psr.cwp, d_ir[4:0]);

  regfile #(.NREGS(NREGS)) u_rf (
    .clk(clk), .cwp(psr.cwp), .rs1(ra_sel), .rs2(d_ir[4:0]), .ra(rf_a), .rb(rf_b),
    .we(wb.valid && wb.wr && !wb.exc && !trap_go), .wpa(wb.wpa), .wd(wb.result));

  dep_check u_dep (
    .pa_a(pa_a), .pa_b(pa_b),
    .e_wr(ex.valid && ex.wr), .e_wpa(ex.wpa),
    .w_wr(wb.valid && wb.wr), .w_wpa(wb.wpa), .mat(mat));

  bypass_unit u_byp (
    .rf_a(rf_a), .rf_b(rf_b), .mat(mat), .e_result(e_result), .w_result(wb.result),
    .op_a(op_a), .op_b(op_b_reg));

  // condition codes: does the instruction in EXE set them (CC-SET)?
  logic cc_set;
  assign cc_set = ex.valid && ex.set_cc && !ex.exc;

  branch_eval u_br (
    .cond(d_ir[28:25]), .annul_bit(d_ir[29]), .psr_icc(psr.icc), .alu_icc(alu_icc),
    .cc_set(cc_set), .br_sel(br_sel), .annul(br_annul));

  // ------------------------------------------------------------------
  // decode stage: control transfer and next-PC selection
  // ------------------------------------------------------------------
  logic d_live;          // a real (not squashed) instruction is in DEC
  logic d_leave;         // DEC finishes its instruction this cycle
  logic d_free;          // DEC can take a new instruction
  logic cti_taken;       // the leaving instruction transfers control
  logic [31:0] cti_target;
  logic [31:0] nxt_pc, nxt_npc;
  logic        nxt_squash;

  assign d_live  = d_valid && !d_squash && !d_trapseq;
  assign d_leave = d_valid && seq_last;
  assign d_free  = !d_valid || d_leave;

  always_comb begin
    cti_taken  = 1'b0;
    cti_target = br_target;
    nxt_squash = 1'b0;
    if (d_live && d_leave) begin
      unique case (dc.cls)
        C_BRANCH: begin cti_taken = br_sel; nxt_squash = br_annul; end
        C_CALL:   cti_taken = 1'b1;
        C_JMPL, C_RETT: begin cti_taken = 1'b1; cti_target = e_result; end
        default: ;
      endcase
    end
    if (d_valid) begin
      nxt_pc  = d_npc;
      nxt_npc = cti_taken ? cti_target : npc_plus4;
    end else begin
      nxt_pc  = exp_pc;
      nxt_npc = exp_npc;
    end
  end

  // ------------------------------------------------------------------
  // fetch, prefetch queue and instruction selection
  // ------------------------------------------------------------------
  logic        cand_valid, cand_fault;
  logic [31:0] cand_ir, cand_pc;
  logic        d_take, mismatch, early;

  assign fire       = !data_ld && !data_st && !error_mode && (q_count < 2'(QDEPTH));
  assign cand_valid = (q_count != 0) || fire;
  assign cand_ir    = (q_count != 0) ? q_ir    : bus_rdata;
  assign cand_pc    = (q_count != 0) ? q_pc    : fa;
  assign cand_fault = (q_count != 0) ? q_fault : inst_fault;

  assign d_take   = d_free && cand_valid && (cand_pc == nxt_pc) && !trap_go && !error_mode;
  assign mismatch = d_free && cand_valid && (cand_pc != nxt_pc) && !trap_go;
  assign early    = d_take && cti_taken;   // delay slot in hand: fetch the target next

  assign q_flush = trap_go || mismatch || early;
  assign q_pop   = d_take && (q_count != 0);
  assign q_push  = fire && !(d_take && q_count == 0);

  assign redirect    = trap_go || mismatch || early;
  assign redirect_pc = trap_go ? vector : (mismatch ? nxt_pc : nxt_npc);

  fetch_unit u_fetch (
    .clk(clk), .rst(rst), .fire(fire), .redirect(redirect), .redirect_pc(redirect_pc),
    .d_pc(d_pc), .disp(disp), .npc(d_npc),
    .fa(fa), .target(br_target), .npc_plus4(npc_plus4));

  prefetch_queue #(.DEPTH(QDEPTH)) u_q (
    .clk(clk), .rst(rst), .flush(q_flush), .push(q_push), .push_ir(bus_rdata),
    .push_pc(fa), .push_fault(inst_fault), .pop(q_pop),
    .head_ir(q_ir), .head_pc(q_pc), .head_fault(q_fault), .count(q_count));

  cycle_counter u_seq (
    .clk(clk), .rst(rst), .load(d_take), .if_ir(cand_ir), .squash(nxt_squash),
    .trapseq(trap_go), .seq(seq), .last(seq_last));

  always_ff @(posedge clk) begin
    if (rst) begin
      d_valid <= 1'b0; d_squash <= 1'b0; d_trapseq <= 1'b0; d_first <= 1'b0; d_ifault <= 1'b0;
      d_ir <= '0; d_pc <= '0; d_npc <= 32'd0;
      exp_pc <= 32'd0; exp_npc <= 32'd4;
    end else if (trap_go) begin
      d_valid <= 1'b1; d_trapseq <= 1'b1; d_squash <= 1'b0; d_first <= 1'b1; d_ifault <= 1'b0;
      d_ir <= '0; d_pc <= trap_pc; d_npc <= vector;
    end else if (d_take) begin
      d_valid <= 1'b1; d_trapseq <= 1'b0; d_squash <= nxt_squash; d_first <= 1'b1;
      d_ifault <= cand_fault;
      d_ir <= cand_ir; d_pc <= nxt_pc; d_npc <= nxt_npc;
    end else if (d_free) begin
      d_valid <= 1'b0; d_first <= 1'b0;
      exp_pc <= nxt_pc; exp_npc <= nxt_npc;
    end else begin
      d_first <= 1'b0;
    end
  end

  // ------------------------------------------------------------------
  // decode stage: pseudo-instruction issue and decode-stage exceptions
  // ------------------------------------------------------------------
  ex_t         iss;
  logic        d_exc;
  logic [7:0]  d_tt;
  logic [2:0]  cwp_new;

  always_comb begin
    // exceptions found in decode (first pseudo-cycle only)
    d_exc = 1'b0;
    d_tt  = '0;
    if (d_live && d_first) begin
      if (d_ifault)                                   begin d_exc = 1'b1; d_tt = TT_IACCESS; end
      else if (dc.illegal || (dc.cls == C_RETT && psr.et && psr.s))
                                                      begin d_exc = 1'b1; d_tt = TT_ILLEGAL; end
      else if (dc.priv && !psr.s)                     begin d_exc = 1'b1; d_tt = TT_PRIV; end
      else if (dc.fpop && !psr.ef)                    begin d_exc = 1'b1; d_tt = TT_FPDIS; end
      else if (dc.cls == C_SAVE && wim[psr.cwp - 3'd1]) begin d_exc = 1'b1; d_tt = TT_WOVF; end
      else if ((dc.cls == C_RESTORE || dc.cls == C_RETT) && wim[psr.cwp + 3'd1])
                                                      begin d_exc = 1'b1; d_tt = TT_WUNF; end
      else if (int_req)                               begin d_exc = 1'b1; d_tt = int_tt; end
    end
    int_taken = d_live && d_first && int_req && (d_tt == int_tt) && d_exc;

    // destination window: SAVE writes into the new window, RESTORE into the old caller's
    cwp_new = psr.cwp;
    if (dc.cls == C_SAVE)    cwp_new = psr.cwp - 3'd1;
    if (dc.cls == C_RESTORE) cwp_new = psr.cwp + 3'd1;

    iss          = '0;
    iss.valid    = d_valid && !d_squash;
    iss.cls      = d_trapseq ? C_TRAPSEQ : dc.cls;
    iss.seq      = seq;
    iss.alu_op   = dc.alu_op;
    iss.sau_op   = dc.sau_op;
    iss.use_sau  = (dc.cls == C_SHIFT);
    iss.a        = op_a;
    iss.b        = dc.use_imm ? imm : op_b_reg;
    iss.set_cc   = dc.set_cc;
    iss.tag_trap = dc.tag_trap;
    iss.ticc     = (dc.cls == C_TICC) && br_sel;
    iss.wr       = dc.wr_rd;
    iss.wpa      = win_phys(cwp_new, d_ir[29:25]);
    iss.spr      = dc.spr;
    iss.size     = dc.size;
    iss.fpop     = dc.fpop;
    iss.exc      = d_exc;
    iss.tt       = d_tt;
    iss.pc       = d_pc;
    iss.npc      = d_npc;
    iss.ir       = d_ir;
    if (d_trapseq) begin
      iss.alu_op = ALU_PASSB; iss.use_sau = 1'b0; iss.set_cc = 1'b0; iss.wr = 1'b1;
      iss.wpa = win_phys(psr.cwp, (seq == 2'd1) ? 5'd17 : 5'd18);
      iss.b   = (seq == 2'd1) ? trap_pc : trap_npc;
      iss.exc = 1'b0; iss.fpop = 1'b0; iss.ticc = 1'b0; iss.tag_trap = 1'b0;
    end else begin
      unique case (dc.cls)
        C_CALL:  begin iss.b = d_pc; iss.wpa = win_phys(psr.cwp, 5'd15); end
        C_SETHI: iss.b = imm;
        C_JMPL:  if (seq == 2'd0) begin iss.alu_op = ALU_PASSB; iss.b = d_pc; end
                 else iss.wr = 1'b0;
        C_RETT:  iss.wr = 1'b0;
        C_SAVE, C_RESTORE: if (seq == 2'd0) iss.wr = 1'b0;
        C_LOAD:  if (seq == 2'd1) iss.wr = 1'b0;
                 else begin iss.use_sau = 1'b1; end
        C_STORE: if (seq == 2'd0) iss.alu_op = ALU_PASSA;
        default: ;
      endcase
      // later pseudo-cycles of SAVE/RESTORE/RETT only hold the slot
      if (seq == 2'd0 && (dc.cls == C_SAVE || dc.cls == C_RESTORE || dc.cls == C_RETT))
        iss.set_cc = 1'b0;
    end
  end

  // ------------------------------------------------------------------
  // execute stage
  // ------------------------------------------------------------------
  logic [7:0] e_tt;
  logic       e_exc, e_live;
  logic       is_addr;

  // RDY/RDPSR/RDWIM/RDTBR read the register in EXE, so an update made by
  // the instruction just ahead (e.g. MULScc writing Y) is already visible
  logic [31:0] e_b;
  always_comb begin
    e_b = ex.b;
    if (ex.cls == C_RDSPR)
      unique case (ex.spr)
        SPR_Y:   e_b = y;
        SPR_PSR: e_b = psr_pack(psr);
        SPR_WIM: e_b = {24'h0, wim};
        default: e_b = tbr;
      endcase
  end

  alu u_alu (
    .op(ex.alu_op), .a(ex.a), .b(e_b), .icc_in(psr.icc), .y_in(y),
    .result(alu_res), .icc_out(alu_icc), .tag_ovf(tag_ovf), .y_next(y_next));

  sau u_sau (
    .op(ex.sau_op), .a((ex.cls == C_LOAD) ? bus_rdata : ex.a), .amt(ex.b[4:0]),
    .ea_lo(daddr[1:0]), .result(sau_res));

  assign e_result = ex.use_sau ? sau_res : alu_res;
  assign is_addr  = (ex.cls == C_LOAD || ex.cls == C_STORE) && ex.seq == 2'd1;

  always_comb begin
    e_exc = ex.exc;
    e_tt  = ex.tt;
    if (!ex.exc) begin
      if (is_addr && ((ex.size == 2'd2 && alu_res[1:0] != 2'b00) ||
                      (ex.size == 2'd1 && alu_res[0])))
        begin e_exc = 1'b1; e_tt = TT_ALIGN; end
      else if (ex.tag_trap && tag_ovf) begin e_exc = 1'b1; e_tt = TT_TAGOVF; end
      else if (ex.ticc) begin e_exc = 1'b1; e_tt = TT_TICC | {1'b0, alu_res[6:0]}; end
    end
  end
  assign e_live = ex.valid && !e_exc && !trap_go;

  spr u_spr (
    .clk(clk), .rst(rst),
    .icc_we(e_live && ex.set_cc), .icc_in(alu_icc),
    .y_we(e_live && ex.alu_op == ALU_MULS && ex.cls == C_ALU), .y_in(y_next),
    .wr_we(e_live && ex.cls == C_WRSPR), .wr_sel(ex.spr), .wr_data(alu_res),
    .cwp_dec(e_live && ex.cls == C_SAVE && ex.seq == 2'd1),
    .cwp_inc(e_live && ex.cls == C_RESTORE && ex.seq == 2'd1),
    .rett(e_live && ex.cls == C_RETT && ex.seq == 2'd1),
    .rollback(trap_go), .trap_enter(trap_go), .trap_tt(trap_tt),
    .psr(psr), .wim(wim), .y(y), .tbr(tbr));

  assign fpu_inst_valid = e_live && ex.fpop;
  assign fpu_inst       = ex.ir;

  always_ff @(posedge clk) begin
    if (rst || trap_go) begin
      ex <= '0;
      wb <= '0;
    end else begin
      ex <= iss;
      wb.valid  <= ex.valid;
      wb.cls    <= ex.cls;
      wb.seq    <= ex.seq;
      wb.result <= e_result;
      wb.wr     <= ex.wr;
      wb.wpa    <= ex.wpa;
      wb.size   <= ex.size;
      wb.exc    <= e_exc;
      wb.tt     <= e_tt;
      wb.pc     <= ex.pc;
      wb.npc    <= ex.npc;
    end
    if (rst) daddr <= '0;
    else if (ex.valid && is_addr) daddr <= alu_res;
  end

  // ------------------------------------------------------------------
  // write-back stage: memory phase and exceptions
  // ------------------------------------------------------------------
  logic w_exc;
  logic [7:0] w_tt;
  assign data_ld = wb.valid && !wb.exc && !trap_go && wb.cls == C_LOAD  && wb.seq == 2'd1;
  assign data_st = wb.valid && !wb.exc && !trap_go && wb.cls == C_STORE && wb.seq == 2'd0;

  always_comb begin
    w_exc = wb.valid && wb.exc && !trap_go;
    w_tt  = wb.tt;
    if (!w_exc && (data_ld || data_st) && data_fault) begin
      w_exc = 1'b1; w_tt = TT_DACCESS;
    end
  end

  bus_if #(.ADDR_W(ADDR_W)) u_bus (
    .fetch_en(fire), .fetch_addr(fa), .dload(data_ld), .dstore(data_st),
    .daddr(daddr), .dsize(wb.size), .st_data(wb.result),
    .addr(bus_addr), .rd(bus_rd), .we(bus_we), .be(bus_be), .wdata(bus_wdata),
    .inst_cycle(bus_inst));

  exception_unit u_exc (
    .clk(clk), .rst(rst), .irl(irl), .pil(psr.pil), .et(psr.et), .fp_exc(fp_exc),
    .int_taken(int_taken), .int_req(int_req), .int_tt(int_tt),
    .w_exc(w_exc), .w_tt(w_tt), .w_pc(wb.pc), .w_npc(wb.npc), .tba(tbr[31:12]),
    .trap_go(trap_go), .trap_tt(trap_tt), .trap_pc(trap_pc), .trap_npc(trap_npc),
    .vector(vector), .intack(intack), .error_mode(error_mode));

endmodule
