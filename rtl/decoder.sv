// decoder: the first-level instruction decoder of the decode stage.
// It turns a SPARC V7 integer instruction word into the control word
// ctrl_t (class, ALU and shift/align operation, immediate select, condition
// code update, register write, memory access size, branch condition and
// annul bit, special register select, privileged/illegal/floating-point
// flags and the cycle count). Later stages decode the fields they need from
// this word as it moves down the pipeline with the instruction
// (data-stationary control). Unimplemented op codes decode as illegal.
// Combinational.
module decoder
  import erisc_pkg::*;
(
  input  logic [31:0] ir,
  output ctrl_t       c
);
  logic [1:0] op;
  logic [2:0] op2;
  logic [5:0] op3;

  always_comb begin
    op  = ir[31:30];
    op2 = ir[24:22];
    op3 = ir[24:19];
    c = '{cls: C_NOP, alu_op: ALU_ADD, sau_op: SAU_SLL, use_imm: ir[13], set_cc: 1'b0,
          tag_trap: 1'b0, wr_rd: 1'b0, size: 2'd2, signed_ld: 1'b0, cond: ir[28:25],
          annul: ir[29], spr: SPR_Y, illegal: 1'b0, priv: 1'b0, fpop: 1'b0, ncycles: 2'd0};
    unique case (op)
      2'b01: begin                               // CALL
        c.cls = C_CALL; c.alu_op = ALU_PASSB; c.wr_rd = 1'b1;
      end
      2'b00: begin
        unique case (op2)
          3'd2: c.cls = C_BRANCH;                // Bicc
          3'd4: begin                            // SETHI (NOP when rd = 0)
            c.cls = C_SETHI; c.alu_op = ALU_PASSB; c.wr_rd = 1'b1;
          end
          3'd6: begin c.cls = C_NOP; c.fpop = 1'b1; end  // FBfcc
          default: c.illegal = 1'b1;             // UNIMP, CBccc
        endcase
      end
      2'b10: begin
        c.cls = C_ALU; c.wr_rd = 1'b1;
        if (op3[5:4] != 2'b11 && op3[5] == 1'b0) begin
          c.set_cc = op3[4];
          unique case (op3[3:0])
            4'h0: c.alu_op = ALU_ADD;
            4'h1: c.alu_op = ALU_AND;
            4'h2: c.alu_op = ALU_OR;
            4'h3: c.alu_op = ALU_XOR;
            4'h4: c.alu_op = ALU_SUB;
            4'h5: c.alu_op = ALU_ANDN;
            4'h6: c.alu_op = ALU_ORN;
            4'h7: c.alu_op = ALU_XNOR;
            4'h8: c.alu_op = ALU_ADDX;
            4'hC: c.alu_op = ALU_SUBX;
            default: begin c.illegal = 1'b1; c.wr_rd = 1'b0; end
          endcase
        end else begin
          unique case (op3)
            6'h20: begin c.alu_op = ALU_TADD; c.set_cc = 1'b1; end
            6'h21: begin c.alu_op = ALU_TSUB; c.set_cc = 1'b1; end
            6'h22: begin c.alu_op = ALU_TADD; c.set_cc = 1'b1; c.tag_trap = 1'b1; end
            6'h23: begin c.alu_op = ALU_TSUB; c.set_cc = 1'b1; c.tag_trap = 1'b1; end
            6'h24: begin c.alu_op = ALU_MULS; c.set_cc = 1'b1; end
            6'h25: begin c.cls = C_SHIFT; c.sau_op = SAU_SLL; end
            6'h26: begin c.cls = C_SHIFT; c.sau_op = SAU_SRL; end
            6'h27: begin c.cls = C_SHIFT; c.sau_op = SAU_SRA; end
            6'h28, 6'h29, 6'h2A, 6'h2B: begin
              c.cls = C_RDSPR; c.alu_op = ALU_PASSB; c.spr = spr_sel_e'(op3[1:0]);
              c.priv = (op3 != 6'h28);
            end
            6'h30, 6'h31, 6'h32, 6'h33: begin
              c.cls = C_WRSPR; c.alu_op = ALU_XOR; c.wr_rd = 1'b0; c.spr = spr_sel_e'(op3[1:0]);
              c.priv = (op3 != 6'h30);
            end
            6'h34, 6'h35: begin c.cls = C_NOP; c.fpop = 1'b1; c.wr_rd = 1'b0; end
            6'h38: begin c.cls = C_JMPL; c.ncycles = 2'd1; end
            6'h39: begin c.cls = C_RETT; c.ncycles = 2'd1; c.wr_rd = 1'b0; c.priv = 1'b1; end
            6'h3A: begin c.cls = C_TICC; c.wr_rd = 1'b0; end
            6'h3B: begin c.cls = C_NOP; c.wr_rd = 1'b0; end          // IFLUSH
            6'h3C: begin c.cls = C_SAVE; c.ncycles = 2'd1; end
            6'h3D: begin c.cls = C_RESTORE; c.ncycles = 2'd1; end
            default: begin c.illegal = 1'b1; c.wr_rd = 1'b0; end
          endcase
        end
      end
      default: begin                             // loads and stores
        c.ncycles = 2'd1;
        unique case (op3)
          6'h00: begin c.cls = C_LOAD;  c.sau_op = SAU_LDW;  c.size = 2'd2; c.wr_rd = 1'b1; end
          6'h01: begin c.cls = C_LOAD;  c.sau_op = SAU_LDUB; c.size = 2'd0; c.wr_rd = 1'b1; end
          6'h02: begin c.cls = C_LOAD;  c.sau_op = SAU_LDUH; c.size = 2'd1; c.wr_rd = 1'b1; end
          6'h09: begin c.cls = C_LOAD;  c.sau_op = SAU_LDSB; c.size = 2'd0; c.wr_rd = 1'b1;
                       c.signed_ld = 1'b1; end
          6'h0A: begin c.cls = C_LOAD;  c.sau_op = SAU_LDSH; c.size = 2'd1; c.wr_rd = 1'b1;
                       c.signed_ld = 1'b1; end
          6'h04: begin c.cls = C_STORE; c.size = 2'd2; end
          6'h05: begin c.cls = C_STORE; c.size = 2'd0; end
          6'h06: begin c.cls = C_STORE; c.size = 2'd1; end
          default: begin c.illegal = 1'b1; c.ncycles = 2'd0; end
        endcase
      end
    endcase
  end
endmodule
