// tb_cm_chip_select: exhaustive check of both common-memory chip-select decoders
// (block M2 at 80000h-BFFFFh and block M1 at C0000h-FFFFFh). For each address
// the expected chips are worked out from the memory map: the 64 KB segment
// (address - block base) / 64K picks the chip pair, A0 = 0 the low chip,
// UBE_n = 0 the high chip.
//
// The expected selects follow the boards' chip-select decoding; the exhaustive
// sweep is this testbench's own.
module tb_cm_chip_select;
  logic [19:16] a;
  logic a0, ube_n;
  logic [7:0] cs2_n, cs1_n;
  int checks = 0, failures = 0;

  cm_chip_select #(.BLOCK_A18(1'b0)) u_m2 (.a(a), .a0(a0), .ube_n(ube_n), .cs_n(cs2_n));
  cm_chip_select #(.BLOCK_A18(1'b1)) u_m1 (.a(a), .a0(a0), .ube_n(ube_n), .cs_n(cs1_n));

  function automatic logic [7:0] expect_n(input int unsigned addr, input int unsigned base,
                                          input logic b0, input logic ub_n);
    logic [7:0] e = '1;
    if (addr >= base && addr < base + 'h40000) begin
      int seg = (addr - base) / 'h10000;
      if (!b0)   e[2*seg]   = 1'b0;
      if (!ub_n) e[2*seg+1] = 1'b0;
    end
    return e;
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {a, a0, ube_n} = 6'(v);
      #1;
      checks++;
      if (cs2_n !== expect_n(32'({a, 16'h0}), 'h80000, a0, ube_n) ||
          cs1_n !== expect_n(32'({a, 16'h0}), 'hC0000, a0, ube_n)) begin
        failures++;
        $display("FAIL a=%h a0=%b ube_n=%b cs2_n=%b cs1_n=%b", a, a0, ube_n, cs2_n, cs1_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
