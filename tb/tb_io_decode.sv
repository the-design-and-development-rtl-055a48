// tb_io_decode: checks the I/O chip selects and READY of a CPU board against the
// decode rules written out independently: GP-IB at even ports 110h-11Eh, parallel
// interface at even ports 100h-10Eh (A15 low, A8 high, A6/A5 low), READY high for
// the lower half of memory and for the upper half only with the bus granted.
//
// The expected values follow the board's decoder equations, evaluated here bit
// by bit from the address.
module tb_io_decode;
  logic        aen, tr2;
  logic [19:0] a;
  logic        gpib_cs_n, pio_cs_n, dc_n, ready;
  int checks = 0, failures = 0;

  io_decode dut (.aen(aen), .a(a), .tr2(tr2), .gpib_cs_n(gpib_cs_n),
                 .pio_cs_n(pio_cs_n), .dc_n(dc_n), .ready(ready));

  task automatic check(input logic [19:0] addr, input logic g, input logic t);
    logic eg, ep, er;
    a = addr; aen = g; tr2 = t; #1;
    eg = (addr[15] == 0) && (addr[8] == 1) && (addr[6:4] == 3'b001) && (addr[0] == 0);
    ep = (addr[15] == 0) && (addr[8] == 1) && (addr[6:4] == 3'b000) && (addr[0] == 0);
    er = (addr < 20'h80000) ? 1'b1 : g;
    checks++;
    if (gpib_cs_n !== !eg || pio_cs_n !== !ep || dc_n !== !t || ready !== er) begin
      failures++;
      $display("FAIL a=%h aen=%b: gpib_cs_n=%b pio_cs_n=%b dc_n=%b ready=%b", addr, g, gpib_cs_n, pio_cs_n, dc_n, ready);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // the named port ranges
    for (int p = 'h100; p < 'h120; p++) check(20'(p), 1'b0, p[1]);
    check(20'h00110, 0, 0);  check(20'h00100, 0, 1);
    check(20'h08110, 0, 0);  check(20'h00111, 0, 0);
    check(20'h7FFFF, 0, 0);  check(20'h80000, 0, 0); check(20'h80000, 1, 0);
    check(20'hFFFFE, 1, 1);  check(20'hC1234, 0, 1);
    for (int n = 0; n < 4000; n++) check(20'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
