// tb_alu: random test of the ALU against a reference model written with
// plain SystemVerilog arithmetic: all operations, condition codes, the
// tagged-overflow flag and the multiply step.
module tb_alu;
  import erisc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  alu_op_e op; logic [31:0] a, b, y, res, yn; icc_t ci, co; logic tovf;
  alu dut (.op(op), .a(a), .b(b), .icc_in(ci), .y_in(y), .result(res), .icc_out(co),
           .tag_ovf(tovf), .y_next(yn));
  int checks = 0, failures = 0;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [32:0] w; logic [31:0] er; icc_t ec; logic et; logic [31:0] ey, x1, x2;
      op = alu_op_e'($urandom_range(0, 14));
      a = $urandom; b = $urandom; y = $urandom; ci = icc_t'($urandom_range(0, 15));
      if (n % 7 == 0) b = a;
      if (n % 11 == 0) begin a[1:0] = 0; b[1:0] = 0; end
      #1;
      et = 0; ey = y; ec = '0;
      case (op)
        ALU_ADD, ALU_TADD: begin w = {1'b0,a} + {1'b0,b}; x1 = a; x2 = b; end
        ALU_ADDX: begin w = {1'b0,a} + {1'b0,b} + ci.c; x1 = a; x2 = b; end
        ALU_SUB, ALU_TSUB: begin w = {1'b0,a} - {1'b0,b}; x1 = a; x2 = ~b; end
        ALU_SUBX: begin w = {1'b0,a} - {1'b0,b} - ci.c; x1 = a; x2 = ~b; end
        ALU_MULS: begin x1 = {ci.n ^ ci.v, a[31:1]}; x2 = y[0] ? b : 0;
                        w = {1'b0,x1} + {1'b0,x2}; ey = {a[0], y[31:1]}; end
        default: begin w = '0; x1 = '0; x2 = '0; end
      endcase
      case (op)
        ALU_AND: er = a & b;  ALU_ANDN: er = a & ~b; ALU_OR: er = a | b;
        ALU_ORN: er = a | ~b; ALU_XOR: er = a ^ b;   ALU_XNOR: er = ~(a ^ b);
        ALU_PASSB: er = b;  ALU_PASSA: er = a;
        default: er = w[31:0];
      endcase
      ec.n = er[31]; ec.z = (er == 0);
      if (op inside {ALU_ADD, ALU_ADDX, ALU_SUB, ALU_SUBX, ALU_TADD, ALU_TSUB, ALU_MULS}) begin
        ec.v = (x1[31] == x2[31]) && (er[31] != x1[31]);
        ec.c = w[32];
        if (op inside {ALU_TADD, ALU_TSUB}) begin
          et = ec.v || a[1:0] != 0 || b[1:0] != 0; ec.v = et;
        end
      end
      checks++;
      if (res !== er || co !== ec || tovf !== et || yn !== ey) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h res=%h/%h icc=%b/%b", op.name(), a, b, res, er, co, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
