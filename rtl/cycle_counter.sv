// cycle_counter: the 2-bit cycle counter (SEQ) of the data-stationary
// pipeline control. When a new instruction is taken into the decode stage
// the counter is loaded with R-1, R being the number of cycles the
// instruction's op code needs (1 to 4); in each later cycle it counts down
// by one. While it is not zero the decode stage keeps the instruction and
// issues one pseudo-instruction per cycle, identified by the counter value;
// SEQ = 0 marks the last pseudo-cycle, after which a new instruction enters.
// A squashed (annulled) instruction is a one-cycle no-op, and the
// trap-entry sequence inserted by the exception logic takes two cycles.
// Counts on the rising edge; reset clears it.
module cycle_counter (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,      // a new instruction enters decode
  input  logic [31:0] if_ir,     // the instruction entering decode
  input  logic        squash,    // it is annulled
  input  logic        trapseq,   // load the trap-entry sequence instead
  output logic [1:0]  seq,
  output logic        last
);
  // Number of cycles minus one, from the op code
  function automatic logic [1:0] inst_cycles_m1(logic [31:0] ir);
    if (ir[31:30] == 2'b11) return 2'd1;               // loads and stores
    if (ir[31:30] == 2'b10)
      unique case (ir[24:19])
        6'h38, 6'h39, 6'h3C, 6'h3D: return 2'd1;        // JMPL RETT SAVE RESTORE
        default: return 2'd0;
      endcase
    return 2'd0;
  endfunction

  always_ff @(posedge clk) begin
    if (rst)            seq <= 2'd0;
    else if (trapseq)   seq <= 2'd1;
    else if (load)      seq <= squash ? 2'd0 : inst_cycles_m1(if_ir);
    else if (seq != 0)  seq <= seq - 2'd1;
  end

  assign last = (seq == 2'd0);
endmodule
