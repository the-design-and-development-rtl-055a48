// tb_dram_array: drives RAS/CAS cycles by hand on the local DRAM array and checks
// what is read against a reference copy: word and single-byte writes, row and
// column halves of the address, and that a RAS-only cycle changes nothing.
// Uses a reduced array (6 row + 6 column bits) to keep the reference small.
//
// Latching the row on the RAS falling edge follows 256K x 1 DRAM chips; the
// address and data patterns are this testbench's own.
module tb_dram_array;
  localparam int RB = 6;
  logic clk = 0;
  always #5 clk = !clk;

  logic ras_n, cash_n, casl_n, we_n;
  logic [RB-1:0] ma;
  logic [15:0] din, dout;
  logic [15:0] ref_m [1 << (2*RB)];
  bit          known [1 << (2*RB)];
  int checks = 0, failures = 0;

  dram_array #(.ROW_BITS(RB), .COL_BITS(RB)) dut (.clk, .ras_n, .cash_n, .casl_n, .we_n, .ma, .din, .dout);

  task automatic cycle(input logic [RB-1:0] row, input logic [RB-1:0] col, input logic w,
                       input logic lo, input logic hi, input logic [15:0] d, output logic [15:0] q);
    @(negedge clk); ras_n = 0; ma = row;
    @(negedge clk); ma = col; casl_n = !lo; cash_n = !hi; we_n = !w; din = d;
    #1 q = dout;
    @(negedge clk); ras_n = 1; casl_n = 1; cash_n = 1; we_n = 1;
    @(negedge clk);
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] q, d;
    logic [RB-1:0] r, c;
    int idx;
    ras_n = 1; cash_n = 1; casl_n = 1; we_n = 1; ma = '0; din = '0;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 600; n++) begin
      r = RB'($urandom); c = RB'($urandom);
      if (n < 64) begin r = RB'(n); c = RB'(n * 7); end
      idx = int'({c, r});
      case ($urandom_range(0, 3))
        0, 1: begin
          d = 16'($urandom);
          cycle(r, c, 1, 1, 1, d, q);
          ref_m[idx] = d; known[idx] = 1;
        end
        2: begin
          d = 16'($urandom);
          if (known[idx]) begin
            cycle(r, c, 1, d[0], !d[0], d, q);
            if (d[0]) ref_m[idx][7:0] = d[7:0]; else ref_m[idx][15:8] = d[15:8];
          end
        end
        default: begin
          // RAS-only refresh of the row, then read
          @(negedge clk); ras_n = 0; ma = r;
          @(negedge clk); ras_n = 1;
          cycle(r, c, 0, 1, 1, 16'h0, q);
          if (known[idx]) begin
            checks++;
            if (q !== ref_m[idx]) begin
              failures++; $display("FAIL r=%0d c=%0d: %h expected %h", r, c, q, ref_m[idx]);
            end
          end
        end
      endcase
    end
    for (int i = 0; i < (1 << (2*RB)); i++) if (known[i]) begin
      cycle(RB'(i), RB'(i >> RB), 0, 1, 1, 16'h0, q);
      checks++;
      if (q !== ref_m[i]) begin failures++; $display("FAIL final %0d: %h expected %h", i, q, ref_m[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
