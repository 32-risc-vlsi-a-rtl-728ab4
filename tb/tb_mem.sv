// tb_mem: behavioural model of the test system memory: a 32K x 32-bit ROM
// at byte address 0 (boot code, test program, trap table) and a 32K x 32-bit
// RAM at byte address 0x20000 (data and stack). Reads are combinational,
// writes happen on the rising clock edge under the byte enables (big-endian
// lanes). The ROM is loaded by the testbench through hierarchical access.
module tb_mem #(
  parameter int unsigned AW    = 24,
  parameter int unsigned WORDS = 32768
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [3:0]    be,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] rom [WORDS];
  logic [31:0] ram [WORDS];
  localparam int unsigned RAM_BASE = WORDS * 4;

  initial begin
    for (int i = 0; i < WORDS; i++) begin rom[i] = 32'h0; ram[i] = 32'h0; end
  end

  always_comb begin
    if (addr < AW'(RAM_BASE))          rdata = rom[addr[16:2]];
    else if (addr < AW'(2 * RAM_BASE)) rdata = ram[addr[16:2]];
    else                               rdata = 32'h0;
  end

  always_ff @(posedge clk) begin
    if (we && addr >= AW'(RAM_BASE) && addr < AW'(2 * RAM_BASE))
      for (int b = 0; b < 4; b++)
        if (be[3-b]) ram[addr[16:2]][8*(3-b) +: 8] <= wdata[8*(3-b) +: 8];
  end
endmodule
