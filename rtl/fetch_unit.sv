// fetch_unit: the program counter chain's address generation.
// It holds the fetch address register (the IF-stage PC) and computes, every
// cycle, all candidate next addresses whether they are used or not: the
// sequential address from a 30-bit incrementer (+1 word), the branch/call
// target from a 30-bit offset adder (decode-stage PC plus word
// displacement), and the successor of the decode instruction's next PC
// (second incrementer). Both adders are 30-bit carry-select adders working
// on word addresses. The pipeline control chooses the next fetch address
// with `redirect`; otherwise the fetch address advances by one word after
// each fetch. The later PCs of the chain (decode, execute, write-back) travel
// with the instructions in the pipeline registers. Rising-edge register,
// reset to address 0.
module fetch_unit (
  input  logic        clk,
  input  logic        rst,
  input  logic        fire,         // a fetch is done this cycle
  input  logic        redirect,
  input  logic [31:0] redirect_pc,
  input  logic [31:0] d_pc,         // PC of the decode-stage instruction
  input  logic [29:0] disp,         // word displacement for the offset adder
  input  logic [31:0] npc,          // next PC to increment
  output logic [31:0] fa,           // current fetch address
  output logic [31:0] target,       // d_pc + 4*disp
  output logic [31:0] npc_plus4
);
  logic [29:0] fa_inc, tgt, npc_inc;
  logic        unused_c0, unused_c1, unused_c2;

  csel_adder #(.W(30), .NBLK(4)) u_inc (
    .a(fa[31:2]), .b(30'd1), .cin(1'b0), .sum(fa_inc), .cout(unused_c0));
  csel_adder #(.W(30), .NBLK(4)) u_off (
    .a(d_pc[31:2]), .b(disp), .cin(1'b0), .sum(tgt), .cout(unused_c1));
  csel_adder #(.W(30), .NBLK(4)) u_ninc (
    .a(npc[31:2]), .b(30'd1), .cin(1'b0), .sum(npc_inc), .cout(unused_c2));

  assign target    = {tgt, 2'b00};
  assign npc_plus4 = {npc_inc, 2'b00};

  always_ff @(posedge clk) begin
    if (rst)           fa <= 32'h0;
    else if (redirect) fa <= {redirect_pc[31:2], 2'b00};
    else if (fire)     fa <= {fa_inc, 2'b00};
  end
endmodule
