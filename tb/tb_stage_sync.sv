// tb_stage_sync: checks the automatic stage synchronisation. After reset the
// modules stay in start-up (ET_n high) until all sub-controllers, having raised
// PB1, lower it; then phase A. The phase moves to B only when every PB1 is high
// and back to A only when every PB1 is low, one clock after the last line
// arrives, and holds while the lines disagree. MAMB_n and MBMA_n are always
// complementary.
//
// The all-low / all-high phase rule follows the board; the end of start-up mode
// is this design's reading, and the PB1 sequences are this testbench's own.
module tb_stage_sync;
  import higips_pkg::*;
  localparam int NST = 3;
  logic clk = 0;
  always #5 clk = !clk;

  logic rst_n, mamb_n, mbma_n, et_n;
  logic [NST-1:0] pb1;
  phase_e phase;
  int checks = 0, failures = 0;

  stage_sync #(.NST(NST)) dut (.clk, .rst_n, .pb1, .mamb_n, .mbma_n, .et_n, .phase);

  task automatic expect_phase(input string what, input phase_e p, input logic e_et_n);
    #1; checks++;
    if (phase !== p || mamb_n !== (p != PHASE_A) || mbma_n !== (p != PHASE_B) || et_n !== e_et_n) begin
      failures++;
      $display("FAIL %s: phase=%s mamb_n=%b mbma_n=%b et_n=%b", what, phase.name(), mamb_n, mbma_n, et_n);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    phase_e cur;
    rst_n = 1; pb1 = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    expect_phase("reset", PHASE_A, 1);
    @(negedge clk) rst_n = 1;
    @(posedge clk); expect_phase("low at reset is not yet steady", PHASE_A, 1);
    // start-up: SUBCs raise PB1 one by one
    for (int i = 0; i < NST; i++) begin
      @(negedge clk) pb1[i] = 1;
      @(posedge clk); expect_phase("start-up", (i == NST - 1) ? PHASE_B : PHASE_A, 1);
    end
    // ... then report ready one by one: the last one enters phase A and the steady state
    for (int i = 0; i < NST; i++) begin
      @(negedge clk) pb1[i] = 0;
      @(posedge clk); expect_phase("ready", (i == NST - 1) ? PHASE_A : PHASE_B, (i == NST - 1) ? 1'b0 : 1'b1);
    end
    // steady operation: random order of stage completions
    cur = PHASE_A;
    for (int f = 0; f < 20; f++) begin
      int order [NST];
      automatic logic lvl = (cur == PHASE_A);
      for (int i = 0; i < NST; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < NST; i++) begin
        repeat ($urandom_range(0, 3)) begin @(posedge clk); expect_phase("hold", cur, 0); end
        @(negedge clk) pb1[order[i]] = lvl;
        @(posedge clk);
        if (i == NST - 1) cur = lvl ? PHASE_B : PHASE_A;
        expect_phase("switch after the last stage", cur, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
