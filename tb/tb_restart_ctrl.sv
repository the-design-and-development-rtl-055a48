// tb_restart_ctrl: checks the automatic restart. NMI rises one clock after the
// last sub-controller drives PB0 low, stays high while the lines change back, and
// falls only when all PB0 are high again; it never rises while any PB0 is high.
//
// Setting NMI when every PB0 is low follows the board; clearing it when every
// PB0 is high is this design's choice, and the sequences are this testbench's
// own.
module tb_restart_ctrl;
  localparam int NST = 3;
  logic clk = 0;
  always #5 clk = !clk;

  logic rst_n, nmi;
  logic [NST-1:0] pb0;
  int checks = 0, failures = 0;

  restart_ctrl #(.NST(NST)) dut (.clk, .rst_n, .pb0, .nmi);

  task automatic expect_nmi(input string what, input logic e);
    #1; checks++;
    if (nmi !== e) begin failures++; $display("FAIL %s: nmi=%b at %0t", what, nmi, $time); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 1; pb0 = '1;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    expect_nmi("reset", 0);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 15; r++) begin
      int order [NST];
      for (int i = 0; i < NST; i++) order[i] = i;
      order.shuffle();
      // stages finish and halt one by one
      for (int i = 0; i < NST; i++) begin
        repeat ($urandom_range(0, 2)) begin @(posedge clk); expect_nmi("while running", 0); end
        @(negedge clk) pb0[order[i]] = 0;
        @(posedge clk); expect_nmi("halt", i == NST - 1);
      end
      // stages resume and raise PB0 one by one
      order.shuffle();
      for (int i = 0; i < NST; i++) begin
        @(negedge clk) pb0[order[i]] = 1;
        @(posedge clk); expect_nmi("resume", i != NST - 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
