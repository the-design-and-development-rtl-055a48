// tb_ppu: checks a processing stage of four CPU boards on one common bus.
// All four boards move blocks of words to and from the common memory at the
// same time (as in the stage's block-transfer measurements) while also using
// their local memory. Checked: every word arrives and reads back correctly; at
// most one board owns the bus in any clock; when all request together the
// sub-controller (board 0) is served first and never waits more than one clock
// per word; the bus never idles while a request waits; local-memory cycles are
// not held up by common-bus traffic.
//
// The priority order and the shared common bus follow the boards; the block
// sizes and bounds are this testbench's own.
module tb_ppu;
  import higips_pkg::*;
  localparam int M = 4;
  logic clk = 0;
  always #5 clk = !clk;

  logic          rst_n;
  cpu_req_t      cpu [M];
  cpu_rsp_t      rsp [M];
  logic [M-1:0]  refresh, ref_ack, pio_cs_n, bus_owner;
  logic          subc_gpib_cs_n, subc_dc_n;
  cbus_t         cbus;
  cbus_rsp_t     own_rsp, next_rsp;
  logic [15:0]   gmem [int];
  int checks = 0, failures = 0;
  int stall_clocks = 0, idle_with_request = 0, max_subc_wait = 0;
  int first_owner = -1;

  ppu #(.M(M)) dut (.clk, .rst_n, .cpu, .cpu_rsp(rsp), .refresh, .ref_ack, .pio_cs_n,
    .subc_tr2(1'b0), .subc_gpib_cs_n, .subc_dc_n, .cbus, .own_mm_rsp(own_rsp),
    .next_mm_rsp(next_rsp), .bus_owner);

  assign refresh = '0;

  // two memory modules on the bus: own module answers C0000h-FFFFFh, next 80000h-BFFFFh
  always_comb begin
    own_rsp = CRSP_IDLE; next_rsp = CRSP_IDLE;
    if (cbus.cyc) begin
      automatic cbus_rsp_t r = '{drive: 1'b1,
        rdata: gmem.exists(int'(cbus.addr[19:1])) ? gmem[int'(cbus.addr[19:1])] : 16'h0};
      if (cbus.addr[18]) own_rsp = r; else next_rsp = r;
    end
  end
  always_ff @(posedge clk) if (cbus.cyc && cbus.we) gmem[int'(cbus.addr[19:1])] = cbus.wdata;

  // bus observation
  always @(posedge clk) if (rst_n) begin
    automatic logic waiting = 1'b0;
    for (int i = 0; i < M; i++)
      if (cpu[i].req && !cpu[i].io && cpu[i].addr[19] && !rsp[i].ready) begin stall_clocks++; waiting = 1'b1; end
    checks++;
    if (!$onehot0(bus_owner)) begin failures++; $display("FAIL two owners %b", bus_owner); end
    if (first_owner < 0 && bus_owner != 0) first_owner = $clog2(int'(bus_owner));
    if (waiting && bus_owner == 0 && !cbus.cyc) idle_with_request++;
  end

  task automatic cycle(input int i, input logic we, input logic [19:0] ad, input logic [15:0] d,
                       output logic [15:0] q, output int clocks);
    cpu[i] = '{req: 1'b1, io: 1'b0, we: we, ube_n: 1'b0, addr: ad, wdata: d};
    clocks = 1;
    #1;
    while (!rsp[i].ready) begin @(negedge clk); clocks++; #1; end
    q = rsp[i].rdata;
    @(posedge clk);
    #1 cpu[i].req = 0;
    @(negedge clk);
  endtask

  task automatic worker(input int i, input int words);
    logic [15:0] q;
    int clocks;
    logic [19:0] base = 20'hC0000 + 20'(i) * 20'h2000;
    logic [19:0] outb = 20'h80000 + 20'(i) * 20'h2000;
    // write a block to the stage's own module
    for (int w = 0; w < words; w++) begin
      cycle(i, 1, base + 20'(2 * w), 16'(i * 4096 + w), q, clocks);
      if (i == 0 && clocks - 1 > max_subc_wait) max_subc_wait = clocks - 1;
    end
    // a local-memory cycle in between: never waits for the common bus
    cycle(i, 1, 20'h00100, 16'hABCD, q, clocks);
    checks++;
    if (clocks > 5) begin failures++; $display("FAIL local cycle of board %0d took %0d clocks", i, clocks); end
    // read the block back and pass it on, incremented, to the next module
    for (int w = 0; w < words; w++) begin
      cycle(i, 0, base + 20'(2 * w), 16'h0, q, clocks);
      checks++;
      if (q !== 16'(i * 4096 + w)) begin failures++; $display("FAIL board %0d word %0d: %h", i, w, q); end
      cycle(i, 1, outb + 20'(2 * w), q + 16'd1, q, clocks);
    end
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 1;
    for (int i = 0; i < M; i++) cpu[i] = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      worker(0, 64);
      worker(1, 64);
      worker(2, 64);
      worker(3, 64);
    join
    for (int i = 0; i < M; i++)
      for (int w = 0; w < 64; w++) begin
        automatic int k = int'(32'(20'(20'h80000 + 20'(i) * 20'h2000 + 20'(2 * w))) >> 1);
        checks++;
        if (!gmem.exists(k) || gmem[k] !== 16'(i * 4096 + w + 1)) begin
          failures++; $display("FAIL next module board %0d word %0d", i, w);
        end
      end
    checks++;
    if (first_owner != 0) begin failures++; $display("FAIL first owner %0d, not the SUBC", first_owner); end
    checks++;
    if (max_subc_wait > 1) begin failures++; $display("FAIL SUBC waited %0d clocks", max_subc_wait); end
    checks++;
    if (stall_clocks == 0) begin failures++; $display("FAIL no bus contention happened"); end
    checks++;
    if (idle_with_request > 4 * M) begin failures++; $display("FAIL bus idle %0d clocks with requests waiting", idle_with_request); end
    $display("contention stall clocks: %0d, idle clocks with a request waiting: %0d", stall_clocks, idle_with_request);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
