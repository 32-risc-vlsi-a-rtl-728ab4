// sau: shift/align unit, working beside the ALU in the execution stage.
// One 64-to-32 funnel shifter does all of its work: the 64-bit input is
// {hi, lo} and the output is bits [cnt+31 : cnt] of it.
//   SLL  : {a, 0} shifted by 32-n        SRL : {0, a} shifted by n
//   SRA  : {sign, a} shifted by n
//   loads: the fetched word is shifted so the addressed byte or halfword
//          (big-endian, chosen by the two low address bits) lands in the
//          low bits, then it is zero- or sign-extended to 32 bits.
// Combinational.
module sau
  import erisc_pkg::*;
(
  input  sau_op_e     op,
  input  logic [31:0] a,      // value to shift, or the memory word for loads
  input  logic [4:0]  amt,    // shift count
  input  logic [1:0]  ea_lo,  // low bits of the effective address (loads)
  output logic [31:0] result
);
  logic [63:0] funnel;
  logic [5:0]  cnt;
  logic [31:0] shifted;

  always_comb begin
    funnel = {32'h0, a};
    cnt    = 6'd0;
    unique case (op)
      SAU_SLL:  begin funnel = {a, 32'h0};           cnt = 6'd32 - {1'b0, amt}; end
      SAU_SRL:  begin funnel = {32'h0, a};           cnt = {1'b0, amt}; end
      SAU_SRA:  begin funnel = {{32{a[31]}}, a};     cnt = {1'b0, amt}; end
      SAU_LDUB, SAU_LDSB: begin funnel = {32'h0, a}; cnt = {1'b0, (2'd3 - ea_lo), 3'b000}; end
      SAU_LDUH, SAU_LDSH: begin funnel = {32'h0, a}; cnt = {1'b0, ~ea_lo[1], 4'b0000}; end
      default:  begin funnel = {32'h0, a};           cnt = 6'd0; end
    endcase
    shifted = funnel[cnt +: 32];
    unique case (op)
      SAU_LDUB: result = {24'h0, shifted[7:0]};
      SAU_LDSB: result = {{24{shifted[7]}}, shifted[7:0]};
      SAU_LDUH: result = {16'h0, shifted[15:0]};
      SAU_LDSH: result = {{16{shifted[15]}}, shifted[15:0]};
      default:  result = shifted;
    endcase
  end
endmodule
