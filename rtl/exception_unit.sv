// exception_unit: exception and error-mode control.
// Exceptions are carried with the instruction that raised them (instruction
// access fault from the prefetch stage, decode-stage faults, execute-stage
// faults, data access fault) and are acknowledged only when that
// instruction reaches the write-back stage, so the oldest instruction is
// always served first and the trap is precise (the instruction is
// restarted). The exception checking logic latches the request; in the
// following cycle `trap_go` flushes the pipeline, rolls the special
// registers back and starts the trap entry at the vector made by the vector
// encoder, {TBR.TBA, tt, 0000}. A trap while traps are disabled (ET = 0)
// instead puts the processor into error mode, where it stops.
// The interrupt request level IRL[3:0] passes through two sampling
// registers; a level that is stable over both, non-zero and above the
// processor interrupt level (or 15, which cannot be masked) while traps
// are enabled raises int_req, which the pipeline control attaches to the
// next instruction it issues. INTACK is raised in the cycle the interrupt
// trap is taken. A fp_exception pulse from the floating-point interface is
// held until it is attached to an instruction in the same way.
module exception_unit
  import erisc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  irl,
  input  logic [3:0]  pil,
  input  logic        et,
  input  logic        fp_exc,
  input  logic        int_taken,   // the pipeline attached the interrupt / fp exception
  output logic        int_req,
  output logic [7:0]  int_tt,
  // write-back stage
  input  logic        w_exc,
  input  logic [7:0]  w_tt,
  input  logic [31:0] w_pc,
  input  logic [31:0] w_npc,
  input  logic [19:0] tba,
  output logic        trap_go,
  output logic [7:0]  trap_tt,
  output logic [31:0] trap_pc,
  output logic [31:0] trap_npc,
  output logic [31:0] vector,
  output logic        intack,
  output logic        error_mode
);
  logic [3:0] irl_s1, irl_s2;
  logic       fpx_pend;

  always_ff @(posedge clk) begin
    if (rst) begin
      irl_s1 <= '0; irl_s2 <= '0; fpx_pend <= 1'b0;
    end else begin
      irl_s1 <= irl;
      irl_s2 <= irl_s1;
      if (fp_exc) fpx_pend <= 1'b1;
      else if (int_taken && fpx_pend) fpx_pend <= 1'b0;
    end
  end

  // interrupt sensing and masking
  always_comb begin
    logic irq;
    irq     = (irl_s1 == irl_s2) && (irl_s2 != 4'd0) && ((irl_s2 == 4'd15) || (irl_s2 > pil));
    int_req = et && (fpx_pend || irq) && !trap_go;
    int_tt  = fpx_pend ? TT_FPEXC : (TT_INT_BASE | {4'h0, irl_s2});
  end

  // exception checking logic and trap latch
  always_ff @(posedge clk) begin
    if (rst) begin
      trap_go <= 1'b0; trap_tt <= '0; trap_pc <= '0; trap_npc <= '0;
      intack <= 1'b0; error_mode <= 1'b0;
    end else begin
      trap_go <= 1'b0;
      intack  <= 1'b0;
      if (w_exc && !trap_go && !error_mode) begin
        if (!et) error_mode <= 1'b1;
        else begin
          trap_go  <= 1'b1;
          trap_tt  <= w_tt;
          trap_pc  <= w_pc;
          trap_npc <= w_npc;
          intack   <= (w_tt[7:4] == 4'h1);
        end
      end
    end
  end

  // vector encoder
  assign vector = {tba, trap_tt, 4'h0};
endmodule
