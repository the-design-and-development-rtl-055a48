// tb_sram_bank: random byte and word writes and reads on a 256 KB common-memory
// block, against an independent reference model (an associative array of bytes
// keyed by byte address). Writes outside the block's window or without the cycle
// strobe must not change anything. Both block addresses (M1 and M2) are used.
//
// The block address range, chip pairs and byte lanes follow the board; the
// access patterns are this testbench's own.
module tb_sram_bank;
  logic clk = 0;
  always #5 clk = !clk;

  logic        cyc, we, ube_n;
  logic [19:0] a;
  logic [15:0] wdata, rd1, rd2;
  logic        hit1, hit2;
  byte unsigned ref_m [int];
  int checks = 0, failures = 0;

  sram_bank #(.BLOCK_A18(1'b1)) u_m1 (.clk, .cyc, .we, .ube_n, .a, .wdata, .rdata(rd1), .hit(hit1));
  sram_bank #(.BLOCK_A18(1'b0)) u_m2 (.clk, .cyc, .we, .ube_n, .a, .wdata, .rdata(rd2), .hit(hit2));

  // byte address -> (block hit, value)
  task automatic write(input logic [19:0] ad, input logic lo, input logic hi, input logic [15:0] d, input logic c);
    @(negedge clk);
    a = {ad[19:1], !lo}; ube_n = !hi; wdata = d; we = 1; cyc = c;
    @(negedge clk);
    cyc = 0; we = 0;
    if (c && ad[19]) begin
      if (lo) ref_m[int'({ad[19:1], 1'b0})] = d[7:0];
      if (hi) ref_m[int'({ad[19:1], 1'b1})] = d[15:8];
    end
  endtask

  task automatic check_word(input logic [19:0] ad);
    logic [15:0] e, r;
    int lo_i, hi_i;
    @(negedge clk);
    a = {ad[19:1], 1'b0}; ube_n = 0; cyc = 1; we = 0;
    #1;
    r = ad[18] ? rd1 : rd2;
    lo_i = int'({ad[19:1], 1'b0}); hi_i = lo_i + 1;
    if (ref_m.exists(lo_i) && ref_m.exists(hi_i)) begin
      e = {ref_m[hi_i], ref_m[lo_i]};
      checks++;
      if (r !== e || (ad[18] ? !hit1 || hit2 : hit1 || !hit2)) begin
        failures++;
        $display("FAIL read %h: %h expected %h (hit %b%b)", ad, r, e, hit1, hit2);
      end
    end
    cyc = 0;
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [19:0] addrs [64];
    cyc = 0; we = 0; a = '0; ube_n = 1; wdata = '0;
    // word writes to both blocks, every segment boundary included
    for (int i = 0; i < 64; i++) begin
      addrs[i] = {1'b1, 19'($urandom)} & 20'hFFFFE;
      if (i < 8) addrs[i] = 20'h80000 + 20'(i) * 20'h10000 + ((i % 2 == 1) ? 20'hFFFE : 20'h0);
      write(addrs[i], 1, 1, 16'($urandom), 1);
    end
    foreach (addrs[i]) check_word(addrs[i]);
    // byte writes: low byte then high byte of some words
    for (int i = 0; i < 32; i++) begin
      write(addrs[i], 1, 0, 16'($urandom), 1);
      write(addrs[i] + 1, 0, 1, 16'($urandom), 1);
    end
    foreach (addrs[i]) check_word(addrs[i]);
    // writes without strobe or in the lower half are ignored
    for (int i = 0; i < 16; i++) begin
      write(addrs[i], 1, 1, 16'hDEAD, 0);
      write(addrs[i] & 20'h7FFFF, 1, 1, 16'hBEEF, 1);
    end
    foreach (addrs[i]) check_word(addrs[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
