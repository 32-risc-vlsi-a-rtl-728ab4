// bus_if: the external bus interface of the shared instruction/data bus.
// In each cycle the bus carries either an instruction fetch or, when the
// write-back stage holds the memory phase of a load or store, that data
// access; the data access has priority and holds the fetch off. The address
// bus is ADDR_W bits wide. For stores the data is replicated onto all byte
// lanes and byte enables select the addressed byte or halfword (big-endian:
// address 0 is bits 31:24). Loads read the whole word; the shift/align unit
// extracts the addressed part. Combinational.
module bus_if #(
  parameter int unsigned ADDR_W = 24
) (
  input  logic              fetch_en,
  input  logic [31:0]       fetch_addr,
  input  logic              dload,
  input  logic              dstore,
  input  logic [31:0]       daddr,
  input  logic [1:0]        dsize,      // 0 byte, 1 half, 2 word
  input  logic [31:0]       st_data,
  output logic [ADDR_W-1:0] addr,
  output logic              rd,         // read strobe (fetch or load)
  output logic              we,
  output logic [3:0]        be,
  output logic [31:0]       wdata,
  output logic              inst_cycle  // this cycle is an instruction fetch
);
  always_comb begin
    inst_cycle = fetch_en && !(dload || dstore);
    addr  = (dload || dstore) ? daddr[ADDR_W-1:0] : fetch_addr[ADDR_W-1:0];
    rd    = inst_cycle || dload;
    we    = dstore;
    unique case (dsize)
      2'd0: begin
        wdata = {4{st_data[7:0]}};
        be    = 4'b1000 >> daddr[1:0];
      end
      2'd1: begin
        wdata = {2{st_data[15:0]}};
        be    = daddr[1] ? 4'b0011 : 4'b1100;
      end
      default: begin
        wdata = st_data;
        be    = 4'b1111;
      end
    endcase
    if (!dstore) be = (dload || inst_cycle) ? 4'b1111 : 4'b0000;
  end
endmodule
