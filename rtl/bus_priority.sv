// bus_priority: parallel priority resolver for the common bus of one stage.
//
// Each CPU board of a stage raises BREQ_n when it wants the stage's common bus.
// An 8-to-3 priority encoder grades the requests into one of eight levels and a
// 3-to-8 decoder turns the winning level back into one active-low BPRN_n line,
// which tells that board's bus arbiter it may take the bus. Line 0 belongs to
// the sub-controller (SUBC), which therefore always wins; line k > 0 belongs to
// slave processor k. At most one BPRN_n is low at a time.
//
// Interface: breq_n[i] in, bprn_n[i] out, all active low, combinational.
// any_req is high when some request is pending (the encoder's group signal).
//
// The encoder-plus-decoder structure and SUBC-on-line-0-highest come from the
// boards. With no request pending the decoder is disabled and no BPRN_n is low;
// that choice is this design's.
module bus_priority #(
  parameter int unsigned NM = 8   // bus masters in a stage (encoder has 8 inputs)
) (
  input  logic [NM-1:0] breq_n,
  output logic [NM-1:0] bprn_n,
  output logic          any_req
);

  localparam int unsigned LW = (NM > 1) ? $clog2(NM) : 1;

  logic [LW-1:0] level;   // encoder output: index of the winning request

  // Priority encoder: the lowest-numbered active request wins.
  always_comb begin
    level   = '0;
    any_req = 1'b0;
    for (int i = NM - 1; i >= 0; i--) begin
      if (!breq_n[i]) begin
        level   = LW'(i);
        any_req = 1'b1;
      end
    end
  end

  // Decoder: one active-low priority line, enabled by the group signal.
  always_comb begin
    bprn_n = '1;
    if (any_req) bprn_n[level] = 1'b0;
  end

endmodule
