// tb_bus_priority: exhaustive check of the stage's parallel priority resolver.
// Every one of the 256 request patterns is applied; the expected grant is the
// lowest-numbered active request (line 0 = sub-controller), at most one grant.
//
// The expected grants follow the board's priority circuit (SUBC highest, at most
// one grant); the exhaustive input sweep is this testbench's own.
module tb_bus_priority;
  logic [7:0] breq_n, bprn_n, exp_n;
  logic       any_req;
  int checks = 0, failures = 0;

  bus_priority #(.NM(8)) dut (.breq_n(breq_n), .bprn_n(bprn_n), .any_req(any_req));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      breq_n = 8'(v);
      #1;
      exp_n = '1;
      for (int i = 0; i < 8; i++) if (!breq_n[i]) begin exp_n[i] = 1'b0; break; end
      checks++;
      if (bprn_n !== exp_n || any_req !== (breq_n != 8'hFF)) begin
        failures++;
        $display("FAIL breq_n=%b bprn_n=%b expected %b", breq_n, bprn_n, exp_n);
      end
    end
    // SUBC always wins against every slave
    breq_n = 8'b0000_0000; #1; checks++;
    if (bprn_n !== 8'b1111_1110) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
