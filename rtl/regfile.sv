// regfile: 136 x 32-bit windowed register file with two read ports and one
// write port. Eight globals and eight overlapping windows of 16 registers
// (see win_phys in erisc_pkg) make 136 physical registers. The array is split
// in two banks, RFA1 with 72 registers (the globals and windows 0..3) and
// RFA2 with 64 (windows 4..7); each read port reads both banks and a
// multiplexer after them picks the bank the address falls in.
// Reads are combinational, addressed by the architectural register number
// and the current window pointer. The write port takes a physical register
// number (computed when the instruction was decoded, so a later change of
// the window pointer does not move it) and writes on the rising clock edge.
// Register 0 always reads as zero and is never written. A read of the
// register being written in the same cycle returns the old value; the
// bypass unit supplies the new one.
module regfile
  import erisc_pkg::*;
#(
  parameter int unsigned NREGS  = 136,
  parameter int unsigned NBANK1 = 72
) (
  input  logic        clk,
  input  logic [2:0]  cwp,
  input  logic [4:0]  rs1,
  input  logic [4:0]  rs2,
  output logic [31:0] ra,
  output logic [31:0] rb,
  input  logic        we,
  input  logic [7:0]  wpa,     // physical register number to write
  input  logic [31:0] wd
);
  localparam int unsigned NBANK2 = NREGS - NBANK1;
  localparam int unsigned AW1 = $clog2(NBANK1);
  localparam int unsigned AW2 = $clog2(NBANK2);

  logic [31:0] rfa1 [NBANK1];
  logic [31:0] rfa2 [NBANK2];

  function automatic logic [31:0] rd_port(logic [7:0] pa, logic [31:0] v1, logic [31:0] v2);
    if (pa == 8'd0) return 32'h0;
    return (pa < 8'(NBANK1)) ? v1 : v2;
  endfunction

  logic [7:0] pa1, pa2;
  logic [31:0] a1, a2, b1, b2;
  always_comb begin
    pa1 = win_phys(cwp, rs1);
    pa2 = win_phys(cwp, rs2);
    a1 = rfa1[AW1'((pa1 < 8'(NBANK1)) ? pa1 : 8'd0)];
    b1 = rfa1[AW1'((pa2 < 8'(NBANK1)) ? pa2 : 8'd0)];
    a2 = rfa2[AW2'((pa1 >= 8'(NBANK1)) ? (pa1 - 8'(NBANK1)) : 8'd0)];
    b2 = rfa2[AW2'((pa2 >= 8'(NBANK1)) ? (pa2 - 8'(NBANK1)) : 8'd0)];
    ra = rd_port(pa1, a1, a2);
    rb = rd_port(pa2, b1, b2);
  end

  always_ff @(posedge clk) begin
    if (we && wpa != 8'd0) begin
      if (wpa < 8'(NBANK1)) rfa1[AW1'(wpa)] <= wd;
      else                  rfa2[AW2'(wpa - 8'(NBANK1))] <= wd;
    end
  end
endmodule
