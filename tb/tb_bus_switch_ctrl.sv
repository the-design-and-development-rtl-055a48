// tb_bus_switch_ctrl: exhaustive check of the bus-switch enables of both memory
// module ports. Expected behaviour, from the phase table: in phase A the own
// port reaches M1 (A18 = 1) and the upper port M2 (A18 = 0); in phase B the
// reverse; a switch only opens for the upper address half, per byte lane; during
// start-up (ET_n high) no switch opens and the own port reads the ROM instead.
//
// The expected enables follow the boards' phase and block rules; the exhaustive
// sweep is this testbench's own.
module tb_bus_switch_ctrl;
  logic a0, a19, a18, ube_n, mamb_n, mbma_n, et_n;
  logic [5:0] own, up;
  int checks = 0, failures = 0;

  bus_switch_ctrl #(.UPPER(1'b0)) u_own (.a0, .a19, .a18, .ube_n, .mamb_n, .mbma_n, .et_n,
    .oe_a_l_n(own[0]), .oe_a_h_n(own[1]), .oe_b_l_n(own[2]), .oe_b_h_n(own[3]),
    .oe_crom_l_n(own[4]), .oe_crom_h_n(own[5]));
  bus_switch_ctrl #(.UPPER(1'b1)) u_up (.a0, .a19, .a18, .ube_n, .mamb_n, .mbma_n, .et_n,
    .oe_a_l_n(up[0]), .oe_a_h_n(up[1]), .oe_b_l_n(up[2]), .oe_b_h_n(up[3]),
    .oe_crom_l_n(up[4]), .oe_crom_h_n(up[5]));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      logic [5:0] eo, eu;
      logic m1, m2, lo, hi;
      {a0, a19, a18, ube_n, mamb_n, mbma_n, et_n} = 7'(v);
      #1;
      lo = a19 && !a0;  hi = a19 && !ube_n;
      m1 = a19 && a18;  m2 = a19 && !a18;
      eo = '1; eu = '1;
      if (!et_n) begin
        if (!mamb_n && m1) begin eo[0] = !lo; eo[1] = !hi; end
        if (!mbma_n && m2) begin eo[2] = !lo; eo[3] = !hi; end
        if (!mamb_n && m2) begin eu[0] = !lo; eu[1] = !hi; end
        if (!mbma_n && m1) begin eu[2] = !lo; eu[3] = !hi; end
      end else begin
        eo[4] = !lo; eo[5] = !hi;
      end
      checks++;
      if (own !== eo || up !== eu) begin
        failures++;
        $display("FAIL in=%b own=%b/%b up=%b/%b", 7'(v), own, eo, up, eu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
