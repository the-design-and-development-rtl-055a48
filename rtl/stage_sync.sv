// stage_sync: automatic synchronisation of the bus switches of all stages.
//
// Every stage's sub-controller (SUBC) owns one parallel-port line, PB1. A stage
// that has finished its work on the current frames moves its PB1 to the level
// of the next phase and waits. The bus switches of all memory modules change
// phase together, and only when every SUBC agrees:
//
//   all PB1 low  -> phase A (MAMB_n low, MBMA_n high)
//   all PB1 high -> phase B (MAMB_n high, MBMA_n low)
//   otherwise    -> phase held
//
// The "all low" and "all high" terms drive the preset and clear of one
// flip-flop, which makes this a wide Muller C-element. The same circuit holds
// the memory modules in start-up mode (ET_n high, start-up ROM on the common
// bus, image memory off) from reset until the all-low condition first begins,
// i.e. until every SUBC, having raised PB1 during start-up, lowers it to
// report that it is ready; the system then enters phase A. Reset itself
// selects phase A.
//
// Timing: the phase changes one clock after the last PB1 arrives. The
// preset/clear terms, the flip-flop and the phase rule follow the boards; the
// start-up exit condition is this design's reading of "disconnected when the
// system becomes steady".
module stage_sync
  import higips_pkg::*;
#(
  parameter int unsigned NST = 3      // stages (SUBCs); the board's device has 7 inputs
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NST-1:0] pb1,         // PB1 of each stage's SUBC
  output logic           mamb_n,
  output logic           mbma_n,
  output logic           et_n,        // low: image memory enabled, ROM off
  output phase_e         phase
);

  logic pr, clr, pr_q;

  assign pr  = (pb1 == '0);           // preset: all SUBCs low  -> phase A
  assign clr = (pb1 == '1);           // clear:  all SUBCs high -> phase B

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PHASE_A;
      et_n  <= 1'b1;
      pr_q  <= 1'b1;
    end else begin
      pr_q <= pr;
      if (pr)       phase <= PHASE_A;
      else if (clr) phase <= PHASE_B;
      if (pr && !pr_q) et_n <= 1'b0;
    end
  end

  assign mamb_n = (phase != PHASE_A);
  assign mbma_n = (phase != PHASE_B);

endmodule
