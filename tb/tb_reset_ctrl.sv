// tb_reset_ctrl: checks power-on and switch reset. Reset is held during power-on
// and for RST_CYCLES clocks after; a press of the switch with contact bounce on
// both contacts gives one unbroken reset that ends RST_CYCLES clocks after the
// normally-closed contact settles; bounce on the normally-open contact alone
// after release does not retrigger it. Then 40 presses with random bounce
// counts and timings must each give exactly one reset pulse.
//
// The bounce-free switch latch follows the board; the stretch length and the
// bounce patterns are this testbench's own.
module tb_reset_ctrl;
  localparam int RC = 8;
  logic clk = 0;
  always #5 clk = !clk;

  logic por_n, sw_no_n, sw_nc_n, reset, reset_n;
  int checks = 0, failures = 0;

  reset_ctrl #(.RST_CYCLES(RC)) dut (.clk, .por_n, .sw_no_n, .sw_nc_n, .reset, .reset_n);

  task automatic chk(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n, rises;
    logic prev;
    por_n = 0; sw_no_n = 1; sw_nc_n = 0;
    repeat (3) @(posedge clk);
    #1 chk("reset during power-on", reset && !reset_n);
    @(negedge clk) por_n = 1;
    n = 0;
    while (reset && n < 100) begin @(posedge clk); #1 n++; end
    chk("power-on stretch length", n >= RC && n <= RC + 3);
    repeat (5) @(posedge clk);
    // press with bounce: NC opens, NO bounces, then closes
    @(negedge clk) sw_nc_n = 1;
    repeat (3) begin @(negedge clk) sw_no_n = 0; @(negedge clk) sw_no_n = 1; end
    @(negedge clk) sw_no_n = 0;
    repeat (4) @(posedge clk);
    #1 chk("reset while pressed", reset);
    // release with bounce on NO, then NC closes
    rises = 0; prev = reset;
    @(negedge clk) sw_no_n = 1;
    repeat (3) begin @(negedge clk) sw_no_n = 0; @(negedge clk) sw_no_n = 1; end
    repeat (6) begin @(posedge clk); #1 chk("held through release bounce", reset); end
    @(negedge clk) sw_nc_n = 0;
    n = 0;
    while (reset && n < 100) begin @(posedge clk); #1 n++; end
    chk("switch stretch length", n >= RC && n <= RC + 4);
    repeat (20) begin @(posedge clk); #1 if (reset && !prev) rises++; prev = reset; end
    chk("no second reset", rises == 0 && !reset);
    // random presses: random bounce counts and contact timings on both contacts
    for (int p = 0; p < 40; p++) begin
      automatic int b1 = $urandom_range(0, 5), b2 = $urandom_range(0, 5);
      automatic int hold = $urandom_range(1, 30);
      rises = 0; prev = reset;
      fork
        begin : watch
          forever begin
            @(posedge clk); #1;
            if (reset && !prev) rises++;
            prev = reset;
            checks++;
            if (reset_n !== !reset) begin failures++; $display("FAIL reset_n not inverse of reset"); end
          end
        end
        begin
          @(negedge clk) sw_nc_n = 1;
          repeat (b1) begin
            repeat ($urandom_range(1, 3)) @(negedge clk); sw_no_n = 0;
            repeat ($urandom_range(1, 3)) @(negedge clk); sw_no_n = 1;
          end
          @(negedge clk) sw_no_n = 0;
          repeat (hold) @(negedge clk);
          sw_no_n = 1;
          repeat (b2) begin
            repeat ($urandom_range(1, 3)) @(negedge clk); sw_no_n = 0;
            repeat ($urandom_range(1, 3)) @(negedge clk); sw_no_n = 1;
          end
          repeat ($urandom_range(1, 4)) @(negedge clk);
          chk("held until the normally-closed contact closes", reset);
          sw_nc_n = 0;
          n = 0;
          while (reset && n < 100) begin @(posedge clk); #1 n++; end
          chk("random press: stretch length", n >= RC && n <= RC + 4);
          repeat (RC + 5) @(posedge clk);
        end
      join_any
      disable watch;
      chk("random press: exactly one reset pulse", rises == 1 && !reset);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
