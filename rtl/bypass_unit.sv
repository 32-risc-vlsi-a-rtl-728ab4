// bypass_unit: internal forwarding in front of the execution stage.
// Two bypass paths serve the operand dependencies on the two previous
// instructions: the result being computed in the execute stage (the
// instruction just ahead) and the result waiting in the write-back stage
// (two ahead). The match bits come from dep_check; when both stages match,
// the younger (execute-stage) result wins. Combinational.
module bypass_unit (
  input  logic [31:0] rf_a,     // register file port A
  input  logic [31:0] rf_b,     // register file port B
  input  logic [3:0]  mat,      // {b_w, b_e, a_w, a_e}
  input  logic [31:0] e_result, // execute-stage result
  input  logic [31:0] w_result, // write-back-stage result
  output logic [31:0] op_a,
  output logic [31:0] op_b
);
  always_comb begin
    op_a = mat[0] ? e_result : (mat[1] ? w_result : rf_a);
    op_b = mat[2] ? e_result : (mat[3] ? w_result : rf_b);
  end
endmodule
