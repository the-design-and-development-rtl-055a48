// tb_bus_if: checks a board's common-bus arbiter and drivers.
// Only memory cycles to the upper half raise BREQ_n; the bus is taken at the
// first clock edge with BPRN_n low and held for exactly one clock, in which the
// cycle's address, direction, byte enable and data appear on the common bus;
// BREQ_n is withdrawn while owning; with BPRN_n high the board waits; when not
// owning the board drives nothing.
//
// The request/grant rule follows the board's bus arbitration; the one-word bus
// tenure checked here is this design's choice, and the stimulus is this
// testbench's own.
module tb_bus_if;
  import higips_pkg::*;
  logic clk = 0;
  always #5 clk = !clk;

  logic     rst_n, bprn_n, breq_n, aen, busy;
  cpu_req_t cpu;
  cbus_t    cbus;
  int checks = 0, failures = 0;

  bus_if dut (.clk, .rst_n, .cpu, .bprn_n, .breq_n, .aen, .busy, .cbus);

  task automatic chk(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one CPU cycle; the grant arrives after 'wait_clks' clocks of BPRN_n high
  task automatic run(input logic io, input logic we, input logic [19:0] ad, input int wait_clks);
    logic common;
    int n;
    common = !io && ad[19];
    @(negedge clk);
    cpu = '{req: 1'b1, io: io, we: we, ube_n: ad[0], addr: ad, wdata: 16'($urandom)};
    bprn_n = 1;
    #1 chk("breq only for common memory", breq_n == !common);
    chk("idle bus before grant", cbus == CBUS_IDLE && !aen);
    if (common) begin
      for (n = 0; n < wait_clks; n++) begin
        @(posedge clk); #1;
        chk("no ownership without priority", !aen && breq_n == 0 && cbus == CBUS_IDLE);
      end
      @(negedge clk) bprn_n = 0;
      @(posedge clk); #1;
      chk("owns one clock after priority", aen && busy);
      chk("breq withdrawn while owning", breq_n == 1);
      chk("common bus carries the cycle", cbus.cyc && cbus.addr == ad && cbus.we == we &&
          cbus.ube_n == cpu.ube_n && cbus.wdata == cpu.wdata);
      @(negedge clk) cpu.req = 0; bprn_n = 1;
      @(posedge clk); #1;
      chk("released after one word", !aen && cbus == CBUS_IDLE);
    end else begin
      @(negedge clk) bprn_n = 0;
      @(posedge clk); #1;
      chk("never owns for local or I/O", !aen && cbus == CBUS_IDLE);
      @(negedge clk) cpu.req = 0; bprn_n = 1;
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 1; cpu = '0; bprn_n = 1;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 1, 20'hC0000, 0);
    run(0, 0, 20'h80002, 3);
    run(0, 1, 20'h12340, 0);   // local
    run(1, 0, 20'h00110, 0);   // I/O
    for (int i = 0; i < 40; i++) run(1'($urandom_range(0, 3) == 0), 1'($urandom), 20'($urandom), $urandom_range(0, 3));
    // continuous demand: ownership alternates with a free clock (one word per grant)
    @(negedge clk);
    cpu = '{req: 1'b1, io: 1'b0, we: 1'b1, ube_n: 1'b0, addr: 20'hC1000, wdata: 16'h1234};
    bprn_n = 0;
    begin
      automatic int owned = 0;
      for (int c = 0; c < 10; c++) begin
        @(posedge clk); #1;
        bprn_n = breq_n;   // a resolver with this board alone
        if (aen) owned++;
      end
      chk("one word every two clocks when alone", owned == 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
