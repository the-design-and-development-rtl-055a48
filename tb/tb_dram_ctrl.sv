// tb_dram_ctrl: checks the local DRAM strobe sequence cycle by cycle.
// For a read or write: one clock with RAS_n low and the row (A9..A1) on the
// address lines, then one clock with RAS_n and the enabled byte's CAS_n low, the
// column (A18..A10) on the lines, SLX high and done high, then two clocks of
// precharge with RAS_n high. A refresh request runs a RAS-only cycle on
// successive rows. Accesses start every four clocks back to back.
//
// The strobe order, byte strobes and RAS-only refresh follow the board; the
// clock counts checked are those of this design's clocked sequence.
module tb_dram_ctrl;
  logic clk = 0;
  always #5 clk = !clk;

  logic rst_n, mem_req, we, ube_n, refresh;
  logic [18:0] a;
  logic ras_n, cash_n, casl_n, we_n, slx, done, ref_ack;
  logic [8:0] ma;
  int checks = 0, failures = 0;

  dram_ctrl dut (.clk, .rst_n, .mem_req, .we, .ube_n, .a, .refresh, .ras_n, .cash_n,
                 .casl_n, .we_n, .slx, .ma, .done, .ref_ack);

  task automatic expect_state(input string what, input logic e_ras_n, input logic e_casl_n,
                              input logic e_cash_n, input logic e_we_n, input logic e_slx,
                              input logic [8:0] e_ma, input logic e_done, input logic chk_ma);
    #1;
    checks++;
    if (ras_n !== e_ras_n || casl_n !== e_casl_n || cash_n !== e_cash_n || we_n !== e_we_n ||
        slx !== e_slx || done !== e_done || (chk_ma && ma !== e_ma)) begin
      failures++;
      $display("FAIL %s: ras=%b casl=%b cash=%b we=%b slx=%b ma=%h done=%b", what,
               ras_n, casl_n, cash_n, we_n, slx, ma, done);
    end
  endtask

  // one access, checked clock by clock; returns clocks from request to done
  task automatic access(input logic [18:0] ad, input logic w, input logic ub_n);
    int n = 0;
    @(negedge clk);
    a = ad; we = w; ube_n = ub_n; mem_req = 1;
    @(posedge clk); n++;
    expect_state("row", 0, 1, 1, 1, 0, ad[9:1], 0, 1);
    @(posedge clk); n++;
    expect_state("col", 0, ad[0], ub_n, !w, 1, ad[18:10], 1, 1);
    @(negedge clk); mem_req = 0;
    @(posedge clk);
    expect_state("pre1", 1, 1, 1, 1, 0, 0, 0, 0);
    @(posedge clk);
    expect_state("pre2", 1, 1, 1, 1, 0, 0, 0, 0);
    checks++;
    if (n != 2) failures++;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int rows_seen;
    rst_n = 1; mem_req = 0; we = 0; ube_n = 1; a = '0; refresh = 0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    access(19'h12346, 0, 0);   // word read
    access(19'h7FFFE, 1, 0);   // word write
    access(19'h00001, 1, 0);   // odd byte write: high lane only
    access(19'h55554, 1, 1);   // even byte write: low lane only
    for (int i = 0; i < 20; i++) access(19'($urandom), 1'($urandom), 1'($urandom));
    // back-to-back rate: a request held continuously completes every 4 clocks
    @(negedge clk); a = 19'h00100; we = 0; ube_n = 0; mem_req = 1;
    rows_seen = 0;
    for (int c = 0; c < 16; c++) begin
      @(posedge clk); #1;
      if (done) rows_seen++;
    end
    mem_req = 0;
    checks++;
    if (rows_seen != 4) begin failures++; $display("FAIL rate: %0d accesses in 16 clocks", rows_seen); end
    // RAS-only refresh on successive rows
    repeat (4) @(posedge clk);
    begin
      logic [8:0] rows [4];
      for (int r = 0; r < 4; r++) begin
        @(negedge clk); refresh = 1;
        @(posedge clk); #1;
        checks++;
        if (ras_n !== 0 || casl_n !== 1 || cash_n !== 1 || !ref_ack) begin
          failures++; $display("FAIL refresh strobes");
        end
        rows[r] = ma;
        @(negedge clk); refresh = 0;
        @(posedge clk); #1;
        checks++;
        if (ras_n !== 1 || casl_n !== 1) begin failures++; $display("FAIL refresh precharge"); end
        @(posedge clk);
        if (r > 0) begin
          checks++;
          if (rows[r] !== rows[r-1] + 9'd1) begin
            failures++; $display("FAIL refresh row %h after %h", rows[r], rows[r-1]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
