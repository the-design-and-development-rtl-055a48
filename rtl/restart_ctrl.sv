// restart_ctrl: automatic restart of the whole pipeline.
//
// When a stage's sub-controller (SUBC) finishes its part of the work it drives
// its parallel-port line PB0 low and halts. When the last SUBC has done so, NMI
// rises and is sent to the SUBC of every stage, which restarts all stages on the
// next frames. An RS flip-flop holds NMI: it is set when all PB0 are low and
// cleared when all PB0 are high again (each SUBC raises PB0 when it resumes),
// so NMI does not ripple while the lines change.
//
// Timing: NMI rises one clock after the last PB0 falls. The AND of all PB0 and
// the flip-flop follow the boards; clearing on "all PB0 high" is this design's
// choice, as the boards do not say what resets the flip-flop.
module restart_ctrl #(
  parameter int unsigned NST = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NST-1:0] pb0,
  output logic           nmi
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            nmi <= 1'b0;
    else if (pb0 == '0)    nmi <= 1'b1;
    else if (pb0 == '1)    nmi <= 1'b0;
  end

endmodule
