// tb_kit_ta2: checks the memory module as a time-shared dual-port memory.
// A reference model keeps the contents of M1 and M2; both ports run random
// cycles in the same clocks. Expected routing, from the phase rules: phase A,
// own port -> M1 (C0000h-FFFFFh), upper port -> M2 (80000h-BFFFFh); phase B the
// reverse; a port whose address falls in the block it is not switched to gets
// no answer and changes nothing. During start-up the own port reads the ROM
// and nothing is written. The main check is the hand-off: what the upper port
// wrote in one phase is read by the own port in the next.
//
// The port-to-block mapping per phase and the start-up ROM behaviour follow the
// boards; the random traffic is this testbench's own.
module tb_kit_ta2;
  import higips_pkg::*;
  logic clk = 0;
  always #5 clk = !clk;

  logic      mamb_n, mbma_n, et_n;
  cbus_t     own_bus, up_bus;
  cbus_rsp_t own_rsp, up_rsp;
  logic [15:0] m1 [int], m2 [int];
  int checks = 0, failures = 0;
  int handoffs = 0;

  kit_ta2 #(.CROM_FILE("tb/crom_test.hex")) dut (.clk, .mamb_n, .mbma_n, .et_n,
    .own_bus, .own_rsp, .up_bus, .up_rsp);

  function automatic cbus_t mk(input logic we, input logic [19:0] ad);
    return '{cyc: 1'b1, we: we, ube_n: 1'b0, addr: {ad[19:1], 1'b0}, wdata: 16'($urandom)};
  endfunction

  // expected answer of one port: is it switched to the block the address is in?
  function automatic logic routed(input logic upper, input logic [19:0] ad);
    logic to_m1 = (!mamb_n) ^ upper;      // phase A: own -> M1; upper -> M2
    if (et_n || !ad[19]) return 1'b0;
    return ad[18] == to_m1;
  endfunction

  task automatic both(input cbus_t o, input cbus_t u);
    logic eo, eu;
    @(negedge clk);
    own_bus = o; up_bus = u;
    #1;
    eo = routed(0, o.addr); eu = routed(1, u.addr);
    checks++;
    if (own_rsp.drive !== (eo || (et_n && o.addr[19])) || up_rsp.drive !== eu) begin
      failures++; $display("FAIL drive own %b/%b up %b/%b (own %h up %h)", own_rsp.drive, eo, up_rsp.drive, eu, o.addr, u.addr);
    end
    if (eo && !o.we) begin
      int k = int'(o.addr[17:1]);
      logic [15:0] e = o.addr[18] ? (m1.exists(k) ? m1[k] : own_rsp.rdata) : (m2.exists(k) ? m2[k] : own_rsp.rdata);
      checks++;
      if (own_rsp.rdata !== e) begin failures++; $display("FAIL own read %h: %h expected %h", o.addr, own_rsp.rdata, e); end
    end
    if (eu && !u.we) begin
      int k = int'(u.addr[17:1]);
      logic [15:0] e = u.addr[18] ? (m1.exists(k) ? m1[k] : up_rsp.rdata) : (m2.exists(k) ? m2[k] : up_rsp.rdata);
      checks++;
      if (up_rsp.rdata !== e) begin failures++; $display("FAIL upper read %h: %h expected %h", u.addr, up_rsp.rdata, e); end
    end
    @(posedge clk);
    if (eo && o.we) begin if (o.addr[18]) m1[int'(o.addr[17:1])] = o.wdata; else m2[int'(o.addr[17:1])] = o.wdata; end
    if (eu && u.we) begin if (u.addr[18]) m1[int'(u.addr[17:1])] = u.wdata; else m2[int'(u.addr[17:1])] = u.wdata; end
    #1 own_bus = CBUS_IDLE; up_bus = CBUS_IDLE;
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [19:0] frame [16];
    own_bus = CBUS_IDLE; up_bus = CBUS_IDLE;
    mamb_n = 0; mbma_n = 1; et_n = 1;
    // start-up: the own port reads the ROM image anywhere in the upper half
    for (int w = 0; w < 32; w++) begin
      @(negedge clk);
      own_bus = mk(0, 20'hFC000 + 20'(2 * w));
      up_bus  = mk(1, 20'h80000 + 20'(2 * w));
      #1 checks++;
      if (!own_rsp.drive || own_rsp.rdata !== 16'(16'hA5C3 ^ (w * 16'h1357)) || up_rsp.drive) begin
        failures++; $display("FAIL start-up ROM word %0d: %h", w, own_rsp.rdata);
      end
      @(posedge clk);
    end
    et_n = 0;
    for (int f = 0; f < 6; f++) begin
      // the upper neighbour writes a frame into the block it owns in this phase
      automatic logic [19:0] base_up  = (!mamb_n) ? 20'h80000 : 20'hC0000;
      automatic logic [19:0] base_own = (!mamb_n) ? 20'hC0000 : 20'h80000;
      for (int i = 0; i < 16; i++) begin
        frame[i] = base_up + 20'(i * 2 + f * 64);
        both(mk(0, base_own + 20'($urandom_range(0, 'h3FFFF))), mk(1, frame[i]));
      end
      // the neighbour reads its frame back through its own port
      for (int i = 0; i < 16; i++)
        both(CBUS_IDLE, mk(0, frame[i]));
      for (int n = 0; n < 40; n++)
        both(mk(1'($urandom), 20'h80000 + 20'($urandom_range(0, 'h7FFFF))),
             mk(1'($urandom), 20'h80000 + 20'($urandom_range(0, 'h7FFFF))));
      // phase change: the own port now reads what the neighbour wrote
      @(negedge clk) {mamb_n, mbma_n} = {mbma_n, mamb_n};
      for (int i = 0; i < 16; i++) begin
        both(mk(0, frame[i]), CBUS_IDLE);
        handoffs++;
      end
    end
    checks++;
    if (handoffs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
