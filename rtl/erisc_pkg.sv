// erisc_pkg: types and constants shared by the blocks of the embedded RISC
// integer unit. The instruction set is the SPARC V7 integer subset (the
// processor is a SPARC-compatible controller with 8 register windows); the
// encodings below are the SPARC ones. The control word produced by the
// decoder and carried down the pipeline (data-stationary control) is the
// ctrl_t struct.
package erisc_pkg;

  // ALU operations (14 arithmetic/logic operations plus the multiply step and
  // a pass-through of operand B used by pseudo-operations)
  typedef enum logic [3:0] {
    ALU_ADD, ALU_ADDX, ALU_SUB, ALU_SUBX,
    ALU_AND, ALU_ANDN, ALU_OR,  ALU_ORN,
    ALU_XOR, ALU_XNOR, ALU_TADD, ALU_TSUB,
    ALU_MULS, ALU_PASSB, ALU_PASSA
  } alu_op_e;

  // Shift/align unit operations
  typedef enum logic [2:0] {
    SAU_SLL, SAU_SRL, SAU_SRA, SAU_LDW, SAU_LDUB, SAU_LDSB, SAU_LDUH, SAU_LDSH
  } sau_op_e;

  // Instruction classes seen by the pipeline control
  typedef enum logic [3:0] {
    C_ALU, C_SHIFT, C_LOAD, C_STORE, C_BRANCH, C_CALL, C_JMPL, C_RETT,
    C_TICC, C_SAVE, C_RESTORE, C_RDSPR, C_WRSPR, C_SETHI, C_NOP, C_TRAPSEQ
  } iclass_e;

  // Special purpose registers for RD/WR
  typedef enum logic [1:0] { SPR_Y, SPR_PSR, SPR_WIM, SPR_TBR } spr_sel_e;

  // Trap types (SPARC tt values)
  localparam logic [7:0] TT_RESET    = 8'h00;
  localparam logic [7:0] TT_IACCESS  = 8'h01;
  localparam logic [7:0] TT_ILLEGAL  = 8'h02;
  localparam logic [7:0] TT_PRIV     = 8'h03;
  localparam logic [7:0] TT_FPDIS    = 8'h04;
  localparam logic [7:0] TT_WOVF     = 8'h05;
  localparam logic [7:0] TT_WUNF     = 8'h06;
  localparam logic [7:0] TT_ALIGN    = 8'h07;
  localparam logic [7:0] TT_FPEXC    = 8'h08;
  localparam logic [7:0] TT_DACCESS  = 8'h09;
  localparam logic [7:0] TT_TAGOVF   = 8'h0A;
  localparam logic [7:0] TT_INT_BASE = 8'h10;
  localparam logic [7:0] TT_TICC     = 8'h80;

  // Integer condition codes
  typedef struct packed { logic n, z, v, c; } icc_t;

  // Processor status register fields kept by the design
  typedef struct packed {
    icc_t       icc;
    logic       ef;
    logic [3:0] pil;
    logic       s, ps, et;
    logic [2:0] cwp;
  } psr_t;

  // Pack / unpack the PSR into its SPARC bit positions
  // impl=0 ver=0 | icc 23:20 | EC 13 | EF 12 | PIL 11:8 | S 7 | PS 6 | ET 5 | CWP 4:0
  function automatic logic [31:0] psr_pack(psr_t p);
    return {8'h00, p.icc, 6'b0, 1'b0, p.ef, p.pil, p.s, p.ps, p.et, 2'b00, p.cwp};
  endfunction
  function automatic psr_t psr_unpack(logic [31:0] w);
    psr_t p;
    p.icc = w[23:20]; p.ef = w[12]; p.pil = w[11:8];
    p.s = w[7]; p.ps = w[6]; p.et = w[5]; p.cwp = w[2:0];
    return p;
  endfunction

  // Decoded control word (one per pseudo-instruction)
  typedef struct packed {
    iclass_e    cls;
    alu_op_e    alu_op;
    sau_op_e    sau_op;
    logic       use_imm;   // operand B is the immediate
    logic       set_cc;    // instruction updates icc
    logic       tag_trap;  // TADDccTV / TSUBccTV
    logic       wr_rd;     // writes rd
    logic [1:0] size;      // memory access size: 0 byte, 1 half, 2 word
    logic       signed_ld;
    logic [3:0] cond;      // branch / trap condition
    logic       annul;
    spr_sel_e   spr;
    logic       illegal;
    logic       priv;      // privileged instruction
    logic       fpop;      // floating point instruction (no FPU attached)
    logic [1:0] ncycles;   // number of cycles minus one (cycle counter load value)
  } ctrl_t;

  // Physical register number of architectural register r in window cwp.
  // 0..7 are the globals; window w occupies 16 registers starting at
  // 8 + 16*w (outs, then locals) and its ins are the outs of window w+1,
  // so the 8 windows share 8*16 = 128 registers: 136 in all.
  function automatic logic [7:0] win_phys(logic [2:0] cwp, logic [4:0] r);
    logic [6:0] off;
    if (r[4:3] == 2'b00) return {3'b000, r};
    off = {cwp, 4'b0000} + {2'b00, r} - 7'd8;
    return 8'd8 + {1'b0, off};
  endfunction

endpackage
