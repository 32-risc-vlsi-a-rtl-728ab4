// dep_check: data dependency check (the match logic of the register file).
// It compares the physical register numbers read by the instruction in the
// decode stage with the destinations of the two instructions ahead of it
// (execute and write-back stages) and reports four match bits,
// MAT = {b_w, b_e, a_w, a_e}, to the bypass unit. Register 0 never matches.
// Physical numbers are compared so that a window change between the
// instructions cannot create a false match. Combinational.
module dep_check (
  input  logic [7:0] pa_a,     // physical register read on port A
  input  logic [7:0] pa_b,     // physical register read on port B
  input  logic       e_wr,     // execute stage will write
  input  logic [7:0] e_wpa,
  input  logic       w_wr,     // write-back stage writes
  input  logic [7:0] w_wpa,
  output logic [3:0] mat
);
  always_comb begin
    mat[0] = e_wr && (e_wpa != 8'd0) && (e_wpa == pa_a);
    mat[1] = w_wr && (w_wpa != 8'd0) && (w_wpa == pa_a);
    mat[2] = e_wr && (e_wpa != 8'd0) && (e_wpa == pa_b);
    mat[3] = w_wr && (w_wpa != 8'd0) && (w_wpa == pa_b);
  end
endmodule
