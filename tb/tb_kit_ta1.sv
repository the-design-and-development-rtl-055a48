// tb_kit_ta1: checks one CPU board between its CPU bus and the common bus.
// Local memory (lower half): random word and byte writes and reads against a
// reference array, each read or write ready two clocks after the request, with
// refresh requests mixed in. Common bus (upper half): the board requests, is
// granted by a one-board resolver, and completes in the granted clock, reading
// from a memory model that answers on the common bus. I/O cycles complete at
// once and produce the GP-IB and parallel-interface chip selects.
//
// The memory map and the READY rule follow the board; the random traffic and the
// clock bounds are this testbench's own.
module tb_kit_ta1;
  import higips_pkg::*;
  logic clk = 0;
  always #5 clk = !clk;

  logic      rst_n, refresh, ref_ack, tr2, gpib_cs_n, pio_cs_n, dc_n, breq_n, bprn_n, busy;
  cpu_req_t  cpu;
  cpu_rsp_t  rsp;
  cbus_t     cbus;
  cbus_rsp_t crsp;
  logic [15:0] cmem [int];     // common memory model, by word
  logic [15:0] lref [int];     // reference local memory, by word
  int checks = 0, failures = 0, refreshes = 0;

  kit_ta1 dut (.clk, .rst_n, .cpu, .cpu_rsp(rsp), .refresh, .ref_ack, .tr2, .gpib_cs_n,
               .pio_cs_n, .dc_n, .breq_n, .bprn_n, .busy, .cbus, .cbus_rsp(crsp));

  assign bprn_n = breq_n;      // this board alone on its bus

  // common memory model on the bus
  always_comb begin
    crsp = CRSP_IDLE;
    if (cbus.cyc) begin
      crsp.drive = 1'b1;
      crsp.rdata = cmem.exists(int'(cbus.addr[19:1])) ? cmem[int'(cbus.addr[19:1])] : 16'h0000;
    end
  end
  always_ff @(posedge clk) if (cbus.cyc && cbus.we) begin
    automatic logic [15:0] w = cmem.exists(int'(cbus.addr[19:1])) ? cmem[int'(cbus.addr[19:1])] : 16'h0000;
    if (!cbus.addr[0]) w[7:0]  = cbus.wdata[7:0];
    if (!cbus.ube_n)   w[15:8] = cbus.wdata[15:8];
    cmem[int'(cbus.addr[19:1])] = w;
  end

  // refresh requests arrive now and then; the board acknowledges them
  always @(posedge clk) begin
    if (ref_ack) begin refresh <= 0; refreshes++; end
    else if (rst_n && $urandom_range(0, 15) == 0) refresh <= 1;
  end

  task automatic cycle(input logic io, input logic we, input logic [19:0] ad, input logic ub_n,
                       input logic [15:0] d, output logic [15:0] q, output int clocks);
    @(negedge clk);
    cpu = '{req: 1'b1, io: io, we: we, ube_n: ub_n, addr: ad, wdata: d};
    clocks = 1;
    #1;
    while (!rsp.ready) begin @(negedge clk); clocks++; #1; end
    q = rsp.rdata;
    @(posedge clk);
    #1 cpu.req = 0;
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] q, d;
    logic [19:0] ad;
    int clocks, w;
    rst_n = 1; cpu = '0; tr2 = 0; refresh = 0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // local memory: word writes then reads
    for (int n = 0; n < 300; n++) begin
      automatic int r0 = refreshes;
      ad = {1'b0, 18'($urandom), 1'b0};
      if (n < 150 || !lref.exists(int'(ad[18:1]))) begin
        d = 16'($urandom);
        cycle(0, 1, ad, 0, d, q, clocks);
        lref[int'(ad[18:1])] = d;
      end else begin
        cycle(0, 0, ad, 0, 0, q, clocks);
        checks++;
        if (q !== lref[int'(ad[18:1])]) begin failures++; $display("FAIL local read %h: %h expected %h", ad, q, lref[int'(ad[18:1])]); end
      end
      checks++;
      if (clocks < 2 || clocks > 5 + 4 * (refreshes - r0)) begin failures++; $display("FAIL local cycle took %0d clocks", clocks); end
    end
    // byte writes to known words
    foreach (lref[k]) begin
      w = k;
      d = 16'($urandom);
      if (d[0]) begin cycle(0, 1, {1'b0, 18'(w), 1'b1}, 0, d, q, clocks); lref[w][15:8] = d[15:8]; end
      else      begin cycle(0, 1, {1'b0, 18'(w), 1'b0}, 1, d, q, clocks); lref[w][7:0]  = d[7:0];  end
      cycle(0, 0, {1'b0, 18'(w), 1'b0}, 0, 0, q, clocks);
      checks++;
      if (q !== lref[w]) begin failures++; $display("FAIL byte write %h: %h expected %h", w, q, lref[w]); end
    end
    // common bus: write then read back, one clock after the request
    for (int n = 0; n < 100; n++) begin
      ad = {1'b1, 18'($urandom), 1'b0};
      d = 16'($urandom);
      cycle(0, 1, ad, 0, d, q, clocks);
      checks++;
      if (clocks != 2) begin failures++; $display("FAIL common write took %0d clocks", clocks); end
      cycle(0, 0, ad, 0, 0, q, clocks);
      checks++;
      if (q !== d || clocks != 2) begin failures++; $display("FAIL common read %h: %h expected %h (%0d clocks)", ad, q, d, clocks); end
    end
    // the local memory is not disturbed by common-bus traffic
    foreach (lref[k]) begin
      cycle(0, 0, {1'b0, 18'(k), 1'b0}, 0, 0, q, clocks);
      checks++;
      if (q !== lref[k]) failures++;
    end
    // I/O cycles: chip selects and immediate completion
    for (int p = 'h100; p < 'h120; p += 2) begin
      @(negedge clk);
      cpu = '{req: 1'b1, io: 1'b1, we: 1'b1, ube_n: 1'b1, addr: 20'(p), wdata: 16'h0};
      tr2 = p[1];
      #1 checks++;
      if (!rsp.ready || gpib_cs_n !== !(p >= 'h110) || pio_cs_n !== !(p < 'h110) || dc_n !== !tr2) begin
        failures++; $display("FAIL I/O %h: ready=%b gpib=%b pio=%b", p, rsp.ready, gpib_cs_n, pio_cs_n);
      end
      @(posedge clk); #1 cpu.req = 0;
    end
    checks++;
    if (refreshes == 0) begin failures++; $display("FAIL no refresh cycle ran"); end
    $display("refresh cycles: %0d", refreshes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
