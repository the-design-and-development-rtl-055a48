// tb_crom: checks the start-up ROM. The first 32 words come from a small test
// image (word i = A5C3h xor (i * 1357h), mod 2^16); the rest must read erased
// (FFFFh). A disabled byte lane must read FFh.
//
// The 16 KB size and the byte-lane enables follow the board; the ROM image and
// its formula are this testbench's own.
module tb_crom;
  logic [13:1] a;
  logic oe_l_n, oe_h_n;
  logic [15:0] rdata;
  int checks = 0, failures = 0;

  crom #(.WORDS(8192), .INIT_FILE("tb/crom_test.hex")) dut (.a, .oe_l_n, .oe_h_n, .rdata);

  task automatic check(input int w, input logic l_n, input logic h_n);
    logic [15:0] e;
    a = 13'(w); oe_l_n = l_n; oe_h_n = h_n; #1;
    e = (w < 32) ? 16'((16'hA5C3 ^ (w * 16'h1357))) : 16'hFFFF;
    if (l_n) e[7:0]  = 8'hFF;
    if (h_n) e[15:8] = 8'hFF;
    checks++;
    if (rdata !== e) begin
      failures++;
      $display("FAIL word %0d oe=%b%b: %h expected %h", w, h_n, l_n, rdata, e);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int w = 0; w < 40; w++) check(w, 1'b0, 1'b0);
    for (int w = 0; w < 8; w++)  begin check(w, 1'b1, 1'b0); check(w, 1'b0, 1'b1); end
    check(8191, 1'b0, 1'b0);
    for (int n = 0; n < 200; n++) check(int'($urandom_range(0, 8191)), 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
