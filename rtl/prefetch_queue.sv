// prefetch_queue: the instruction prefetch queue. It holds up to DEPTH
// fetched instructions, each with its address and its instruction-access
// fault flag, so that fetching can go on while the decode stage is busy
// with a multi-cycle instruction and the decode stage can be fed while the
// bus carries a data access. First in, first out; push and pop may happen
// in the same cycle; flush empties it and wins over a push. The head is
// valid whenever count is not zero. Registers update on the rising edge.
module prefetch_queue #(
  parameter int unsigned DEPTH = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        flush,
  input  logic        push,
  input  logic [31:0] push_ir,
  input  logic [31:0] push_pc,
  input  logic        push_fault,
  input  logic        pop,
  output logic [31:0] head_ir,
  output logic [31:0] head_pc,
  output logic        head_fault,
  output logic [1:0]  count
);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [31:0] ir_q [DEPTH];
  logic [31:0] pc_q [DEPTH];
  logic        ft_q [DEPTH];

  assign head_ir    = ir_q[0];
  assign head_pc    = pc_q[0];
  assign head_fault = ft_q[0];

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        ir_q[i] <= '0; pc_q[i] <= '0; ft_q[i] <= 1'b0;
      end
    end else begin
      logic [1:0] n;
      n = count;
      if (pop && n != 0) begin
        for (int i = 0; i < DEPTH - 1; i++) begin
          ir_q[i] <= ir_q[i+1]; pc_q[i] <= pc_q[i+1]; ft_q[i] <= ft_q[i+1];
        end
        n = n - 2'd1;
      end
      if (push && n < 2'(DEPTH)) begin
        ir_q[IW'(n)] <= push_ir; pc_q[IW'(n)] <= push_pc; ft_q[IW'(n)] <= push_fault;
        n = n + 2'd1;
      end
      count <= n;
    end
  end
endmodule
