// csel_adder: W-bit carry-select adder built from NBLK ripple-carry blocks.
// Every block above the lowest computes its sum twice, for a carry-in of 0
// and of 1, and the real carry from the block below selects one of them, so
// the carry ripples only through one block plus NBLK-1 multiplexers. The
// execution unit uses a 32-bit, 4-block instance; the PC incrementer and the
// branch offset adder use 30-bit instances. Purely combinational.
module csel_adder #(
  parameter int unsigned W    = 32,
  parameter int unsigned NBLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned BW = (W + NBLK - 1) / NBLK;

  always_comb begin
    logic c;
    logic [BW:0] s0, s1;
    logic [BW-1:0] ab, bb;
    c   = cin;
    sum = '0;
    for (int k = 0; k < NBLK; k++) begin
      ab = '0; bb = '0;
      for (int i = 0; i < BW; i++) begin
        if (k*BW + i < W) begin
          ab[i] = a[k*BW+i];
          bb[i] = b[k*BW+i];
        end
      end
      // ripple block with both carry-ins
      s0 = {1'b0, ab} + {1'b0, bb};
      s1 = {1'b0, ab} + {1'b0, bb} + 1'b1;
      for (int i = 0; i < BW; i++)
        if (k*BW + i < W) sum[k*BW+i] = c ? s1[i] : s0[i];
      // carry out of the real (possibly partial) block width
      if ((k+1)*BW <= W) c = c ? s1[BW] : s0[BW];
      else               c = c ? s1[W-k*BW] : s0[W-k*BW];
    end
    cout = c;
  end
endmodule
