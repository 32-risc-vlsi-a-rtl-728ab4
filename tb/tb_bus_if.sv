// tb_bus_if: address multiplexing between fetch and data access, strobes,
// and big-endian byte lane placement of byte, halfword and word stores.
module tb_bus_if;
  logic clk = 0;
  always #5 clk = ~clk;
  logic fe, dl, ds, rd, we, ic; logic [31:0] fa, da, sd, wd; logic [1:0] sz; logic [23:0] a; logic [3:0] be;
  bus_if dut (.fetch_en(fe), .fetch_addr(fa), .dload(dl), .dstore(ds), .daddr(da), .dsize(sz),
    .st_data(sd), .addr(a), .rd(rd), .we(we), .be(be), .wdata(wd), .inst_cycle(ic));
  int checks = 0, failures = 0;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [3:0] ebe; logic [31:0] ewd;
      fe = 1'($urandom); fa = $urandom; da = $urandom; sd = $urandom; sz = 2'($urandom_range(0, 2));
      dl = 0; ds = 0;
      case ($urandom_range(0, 2)) 1: dl = 1; 2: ds = 1; default: ; endcase
      #1;
      checks += 4;
      if (a !== ((dl || ds) ? da[23:0] : fa[23:0])) failures++;
      if (ic !== (fe && !dl && !ds) || rd !== ((fe && !ds) || dl) || we !== ds) failures++;
      ewd = (sz == 0) ? {4{sd[7:0]}} : (sz == 1) ? {2{sd[15:0]}} : sd;
      ebe = !ds ? ((dl || fe) ? 4'hF : 4'h0) :
            (sz == 0) ? (4'b1000 >> da[1:0]) : (sz == 1) ? (da[1] ? 4'b0011 : 4'b1100) : 4'hF;
      if (be !== ebe) failures++;
      if (ds && wd !== ewd) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
