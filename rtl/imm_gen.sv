// imm_gen: immediate data module of the decode stage. It picks, by
// instruction format, the constants an instruction carries and formats
// them for the data path:
//   imm  - operand-B constant: for SETHI the 22-bit field placed in bits
//          31:10 with zeros below, for every other format the 13-bit
//          immediate sign-extended to 32 bits;
//   disp - word displacement for the 30-bit offset adder of the PC chain:
//          for CALL the 30-bit field as it stands, otherwise the 22-bit
//          branch displacement sign-extended to 30 bits.
// The format is read from the op field (bits 31:30) and, for format 2,
// op2 (bits 24:22). Field positions are those of the SPARC encoding; the
// module's role (sign extension and formatting of constants) follows the
// published design. Combinational.
module imm_gen (
  input  logic [31:0] ir,
  output logic [31:0] imm,
  output logic [29:0] disp
);
  logic is_sethi, is_call;

  always_comb begin
    is_sethi = (ir[31:30] == 2'b00) && (ir[24:22] == 3'b100);
    is_call  = (ir[31:30] == 2'b01);
    imm  = is_sethi ? {ir[21:0], 10'h000} : {{19{ir[12]}}, ir[12:0]};
    disp = is_call  ? ir[29:0]            : {{8{ir[21]}}, ir[21:0]};
  end
endmodule
