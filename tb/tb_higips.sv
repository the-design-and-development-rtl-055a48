// tb_higips: end-to-end run of the whole pipeline at its default size
// (3 stages of 2 processing elements, full memory sizes).
//
// The testbench plays the CPUs. After power-on every CPU reads the start-up ROM
// over the common bus and copies it into its local memory; the sub-controllers
// then report ready (PB1), which ends start-up and selects phase A. Then frames
// flow through the pipeline: in every phase the input controller writes a new
// frame into the first memory module, each stage's two elements split the
// frame they find in their own module into halves, copy their half into local
// memory, apply the stage's operation and write the result into the next
// module, and the output controller reads the frame that left the last stage.
// The sub-controllers then report END on GP-IB, set PB1 one by one, and the
// phase changes only when the last one has; they halt with PB0 low and the
// restart NMI brings them back. Every frame that reaches the output is checked
// against the three stage operations applied in order.
//
// Mechanisms counted and required at least once: start-up ROM reads, common-bus
// contention stalls, phase changes both ways, phase held while stages disagree,
// restart NMIs, DRAM refresh cycles, GP-IB and parallel-interface selects.
//
// The frame flow, the phase rules and the restart follow the pipeline's
// operation; the stage operations, the frame size and the CPU behaviour are this
// testbench's own.
module tb_higips;
  import higips_pkg::*;
  localparam int N = 3, M = 2;
  localparam int WORDS  = 3200;          // 320 x 20 bytes per frame
  localparam int STEPS  = 6;             // phases run; frames 0..STEPS-5 reach the output
  localparam int NCH    = N * M + 2;     // CPU channels: PEs, then PIC, then POC
  localparam int PIC = N * M, POC = N * M + 1;

  logic clk = 0;
  always #5 clk = !clk;

  logic por_n, sw_no_n, sw_nc_n, reset_n, nmi, mamb_n, mbma_n, et_n;
  cpu_req_t chan [NCH];
  cpu_rsp_t crsp [NCH];
  cpu_req_t pe_cpu [N*M];
  cpu_rsp_t pe_rsp [N*M];
  logic [N*M-1:0] pe_refresh, pe_ref_ack, pe_pio_cs_n, pe_bus_owner;
  logic [N-1:0] subc_tr2, subc_gpib_cs_n, subc_dc_n, subc_pb0, subc_pb1;
  logic pic_gpib_cs_n, pic_pio_cs_n, poc_gpib_cs_n, poc_pio_cs_n;
  phase_e phase;

  higips dut (
    .clk, .por_n, .sw_no_n, .sw_nc_n, .reset_n,
    .pe_cpu, .pe_rsp, .pe_refresh, .pe_ref_ack, .pe_pio_cs_n, .pe_bus_owner,
    .subc_tr2, .subc_gpib_cs_n, .subc_dc_n, .subc_pb0, .subc_pb1, .nmi,
    .pic_cpu(chan[PIC]), .pic_rsp(crsp[PIC]), .pic_refresh(1'b0), .pic_tr2(1'b0),
    .pic_gpib_cs_n, .pic_pio_cs_n,
    .poc_cpu(chan[POC]), .poc_rsp(crsp[POC]), .poc_refresh(1'b0), .poc_tr2(1'b0),
    .poc_gpib_cs_n, .poc_pio_cs_n,
    .mamb_n, .mbma_n, .et_n, .phase
  );

  for (genvar j = 0; j < N * M; j++) begin : g_ch
    assign pe_cpu[j] = chan[j];
    assign crsp[j]   = pe_rsp[j];
  end

  int checks = 0, failures = 0;
  int n_rom = 0, n_stall = 0, n_ab = 0, n_ba = 0, n_hold = 0, n_nmi = 0, n_refresh = 0,
      n_gpib = 0, n_pio = 0, n_frames = 0;

  task automatic chk(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- stage operations (the "image processing" of each stage) ----------
  function automatic logic [15:0] op(input int s, input logic [15:0] x);
    case (s)
      0:       return x ^ 16'h00FF;             // stage 1: invert the low byte
      1:       return x + 16'd3;                // stage 2: offset
      default: return {x[14:0], x[15]};         // stage 3: rotate
    endcase
  endfunction
  function automatic logic [15:0] pixel(input int f, input int w);
    return 16'(f * 16'h1111 + w * 7);
  endfunction

  // ---- bus observers -------------------------------------------------------
  logic nmi_q = 0;
  phase_e phase_q = PHASE_A;
  always @(posedge clk) begin
    for (int j = 0; j < NCH; j++)
      if (chan[j].req && !chan[j].io && chan[j].addr[19] && !crsp[j].ready) n_stall++;
    if (nmi && !nmi_q) n_nmi++;
    nmi_q <= nmi;
    if (reset_n && !et_n && phase != phase_q) begin
      if (phase == PHASE_B) n_ab++; else n_ba++;
    end
    phase_q <= phase;
    if (!subc_gpib_cs_n[0] && chan[0].req && chan[0].io) n_gpib++;
    for (int j = 0; j < N * M; j++) if (!pe_pio_cs_n[j] && chan[j].req && chan[j].io) n_pio++;
  end

  // refresh requests of the processing elements' CPUs
  always @(posedge clk) begin
    for (int j = 0; j < N * M; j++) begin
      if (pe_ref_ack[j]) begin pe_refresh[j] <= 1'b0; n_refresh++; end
      else if (reset_n && $urandom_range(0, 63) == 0) pe_refresh[j] <= 1'b1;
    end
  end

  // ---- one CPU bus cycle on channel j --------------------------------------
  task automatic cyc(input int j, input logic io, input logic we, input logic [19:0] ad,
                     input logic [15:0] d, output logic [15:0] q);
    chan[j] = '{req: 1'b1, io: io, we: we, ube_n: 1'b0, addr: ad, wdata: d};
    #1;
    while (!crsp[j].ready) begin @(negedge clk); #1; end
    q = crsp[j].rdata;
    @(posedge clk);
    #1 chan[j].req = 1'b0;
    @(negedge clk);
  endtask

  // common-memory windows seen from a port in the current phase
  function automatic logic [19:0] in_base();   // own port: M1 in phase A, M2 in B
    return (phase == PHASE_A) ? 20'hC0000 : 20'h80000;
  endfunction
  function automatic logic [19:0] out_base();  // next module's upper port: M2 in A, M1 in B
    return (phase == PHASE_A) ? 20'h80000 : 20'hC0000;
  endfunction

  // ---- start-up: copy the ROM monitor into local memory ---------------------
  task automatic boot(input int j);
    logic [15:0] q, r;
    for (int w = 0; w < 16; w++) begin
      cyc(j, 0, 0, 20'hFC000 + 20'(2 * w), 16'h0, r);
      n_rom++;
      chk("start-up ROM reads erased", r == 16'hFFFF);
      cyc(j, 0, 1, 20'h00400 + 20'(2 * w), r ^ 16'(w), q);
    end
    for (int w = 0; w < 16; w++) begin
      cyc(j, 0, 0, 20'h00400 + 20'(2 * w), 16'h0, q);
      chk("monitor copied to local memory", q == (16'hFFFF ^ 16'(w)));
    end
  endtask

  // ---- a processing element's share of one stage step ------------------------
  task automatic pe_work(input int s, input int i);
    logic [15:0] q, x;
    int j = s * M + i;
    int lo = i * WORDS / M, hi = (i + 1) * WORDS / M;
    logic [19:0] ib = in_base(), ob = out_base();
    // global -> local block transfer
    for (int w = lo; w < hi; w++) begin
      cyc(j, 0, 0, ib + 20'(2 * w), 16'h0, x);
      cyc(j, 0, 1, 20'h10000 + 20'(2 * w), x, q);
    end
    // process from local memory, results to the next module
    for (int w = lo; w < hi; w++) begin
      cyc(j, 0, 0, 20'h10000 + 20'(2 * w), 16'h0, x);
      cyc(j, 0, 1, ob + 20'(2 * w), op(s, x), q);
    end
  endtask

  task automatic pic_work(input int f);
    logic [15:0] q;
    logic [19:0] ob = out_base();
    for (int w = 0; w < WORDS; w++) cyc(PIC, 0, 1, ob + 20'(2 * w), pixel(f, w), q);
  endtask

  task automatic poc_work(input int f);
    logic [15:0] q, e;
    logic [19:0] ib = in_base();
    int bad = 0;
    for (int w = 0; w < WORDS; w++) begin
      cyc(POC, 0, 0, ib + 20'(2 * w), 16'h0, q);
      e = op(2, op(1, op(0, pixel(f, w))));
      if (q !== e) begin
        if (bad < 5) $display("FAIL frame %0d word %0d: %h expected %h", f, w, q, e);
        bad++;
      end
    end
    chk("frame through all stages", bad == 0);
    n_frames++;
  endtask

  task automatic stage_work(input int s);
    logic [15:0] q;
    fork
      automatic int ss = s;
      begin
        fork
          pe_work(ss, 0);
          pe_work(ss, 1);
        join
      end
    join
    cyc(s * M, 1, 1, 20'h00110, 16'h0045, q);   // "END" to the system controller (GP-IB)
    cyc(s * M, 1, 1, 20'h00100, 16'h0000, q);   // parallel interface write
  endtask

  initial begin
    #2_000_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [N-1:0] lvl;
    for (int j = 0; j < NCH; j++) chan[j] = '0;
    pe_refresh = '0; subc_tr2 = '0; subc_pb0 = '1; subc_pb1 = '0;
    por_n = 0; sw_no_n = 1; sw_nc_n = 0;
    repeat (5) @(posedge clk);
    por_n = 1;
    wait (reset_n);
    @(negedge clk);
    // start-up: SUBCs hold PB1 high while they boot
    subc_pb1 = '1;
    fork
      boot(0); boot(1); boot(2); boot(3); boot(4); boot(5); boot(PIC); boot(POC);
    join
    chk("start-up mode until the stages are ready", et_n == 1'b1);
    subc_pb1 = '0;
    repeat (2) @(posedge clk);
    #1 chk("steady state in phase A", et_n == 1'b0 && phase == PHASE_A && !mamb_n && mbma_n);
    @(negedge clk);
    for (int t = 0; t < STEPS; t++) begin
      automatic phase_e ph0 = phase;
      fork
        pic_work(t);
        stage_work(0);
        stage_work(1);
        stage_work(2);
        if (t >= N + 1) poc_work(t - N - 1);
      join
      // the stages report done one by one; the phase waits for the last
      lvl = (phase == PHASE_A) ? '1 : '0;
      for (int s = 0; s < N; s++) begin
        subc_pb1[s] = lvl[s];
        subc_pb0[s] = 1'b0;                    // halt
        repeat (3) @(posedge clk);
        #1;
        if (s < N - 1) begin
          chk("phase held until every stage is done", phase == ph0);
          n_hold++;
        end
        @(negedge clk);
      end
      chk("phase changed after the last stage", phase != ph0);
      chk("restart NMI after every stage halted", nmi == 1'b1);
      subc_pb0 = '1;                           // the NMI restarts every SUBC
      repeat (2) @(posedge clk);
      @(negedge clk);
    end
    chk("start-up ROM was read", n_rom > 0);
    chk("common-bus contention happened", n_stall > 0);
    chk("phase A to B happened", n_ab > 0);
    chk("phase B to A happened", n_ba > 0);
    chk("phase was held while stages disagreed", n_hold > 0);
    chk("restart NMI happened", n_nmi == STEPS);
    chk("DRAM refresh happened", n_refresh > 0);
    chk("GP-IB controller was selected", n_gpib > 0);
    chk("parallel interface was selected", n_pio > 0);
    chk("frames reached the output", n_frames == STEPS - N - 1);
    $display("rom=%0d stalls=%0d A->B=%0d B->A=%0d holds=%0d nmi=%0d refresh=%0d gpib=%0d pio=%0d frames=%0d",
             n_rom, n_stall, n_ab, n_ba, n_hold, n_nmi, n_refresh, n_gpib, n_pio, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
