// tb_block_transfer: the stage's image-block transfer workload, for stages of
// 1 to 7 processing elements and image blocks 320 bytes wide and 20, 30, 40,
// 50, 100 and 200 lines high.
//
// Seven stages run side by side, stage g with M = g + 1 elements. Each stage
// has its own memory module (frame input, read at C0000h in phase A) and the
// next module on its common bus, as in the pipeline. For every image height L:
//
//   1. phase B: the testbench, acting as the unit before the stage, writes an
//      L x 320-byte image into block M1 of the stage's module through the
//      module's upper port, one word per clock;
//   2. phase A: every element copies its horizontal strip of the image from
//      the common memory into its local DRAM at 10000h, word by word (common
//      read, then local write), all elements at once and competing for the
//      common bus. Strip m holds lines m*P .. (m+1)*P - 1 with P = ceil(L/M),
//      plus one overlapping line above and below where the image has them;
//   3. every element reads its strip back from local DRAM and compares it with
//      the image;
//   4. for the full 320 x 200 image only: every element runs the stage's
//      processing tasks on its own lines from its local copy, the overlap
//      lines supplying the neighbours: 3 x 3 smoothing (mean), sharpening
//      (5c - n - s - e - w) and Laplacian edge detection (|4c - n - s - e - w|),
//      each clipped to 0..255 with image border pixels passed through, and the
//      gray-level histogram. Result lines go into the next module at
//      80000h + op * 64000, the 256 histogram counts at B0000h + 512 * element.
//      Then, in phase B, the testbench reads all three result frames from the
//      next module's own port, and adds the partial histograms, and compares
//      them with values computed here from the pixel formula.
//
// Pixel (y, x) of an image of height L is (y * 37 + x * 11 + L) mod 256, with
// the even column in the low byte of each word. CPU refresh requests arrive
// every 240 clocks per element and run between the copy cycles.
//
// Checked, besides the data: with one element no cycle ever waits for the bus;
// the sub-controller (element 0), which has the highest bus priority, gets the
// same per-word time whatever M is, within one clock per word; with 7 elements
// the lowest-priority element transfers more slowly than the sub-controller.
// The per-word times are printed as a table (clocks per 16-bit word).
//
// The image sizes, the range of M, the overlapping strips, the four kinds of
// processing (histogram, sharpening, smoothing, edge detection) and the output
// of the results into the next stage's module are those of the prototype's
// measurements; the kernels' exact weights and clipping, the pixel pattern,
// the refresh interval and the bounds checked are this testbench's own.
module tb_block_transfer;
  import higips_pkg::*;
  localparam int NS = 7;                 // stages with 1..NS elements
  localparam int NL = 6;
  localparam int LINES [NL] = '{20, 30, 40, 50, 100, 200};
  localparam int KW = 160;               // words per 320-byte line

  logic clk = 0;
  always #5 clk = !clk;
  logic rst_n;

  int checks = 0, failures = 0;
  int n_refresh = 0, n_contended = 0, n_processed = 0;
  real cpw [NS][NL][NS];                 // clocks per word: [M-1][size][element]
  logic [NS-1:0] done = '0;

  function automatic logic [7:0] pix(input int y, input int x, input int l);
    return 8'((y * 37 + x * 11 + l) % 256);
  endfunction

  // the three 3 x 3 operations: 0 mean (smoothing), 1 sharpening
  // (5c - n - s - e - w, clipped to 0..255), 2 Laplacian edge magnitude
  // (|4c - n - s - e - w|, clipped to 255)
  function automatic logic [7:0] kernel(input int op, input int v [3][3]);
    int r = 0;
    case (op)
      0: begin
        for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++) r += v[a][b];
        r = r / 9;
      end
      1: r = 5 * v[1][1] - v[0][1] - v[2][1] - v[1][0] - v[1][2];
      default: begin
        r = 4 * v[1][1] - v[0][1] - v[2][1] - v[1][0] - v[1][2];
        if (r < 0) r = -r;
      end
    endcase
    if (r < 0) r = 0;
    if (r > 255) r = 255;
    return 8'(r);
  endfunction

  // expected result of operation op; border pixels pass through
  function automatic logic [7:0] op_ref(input int op, input int y, input int x, input int l);
    int v [3][3];
    if (y == 0 || y == l - 1 || x == 0 || x == 2 * KW - 1) return pix(y, x, l);
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++) v[dy + 1][dx + 1] = int'(pix(y + dy, x + dx, l));
    return kernel(op, v);
  endfunction

  for (genvar g = 0; g < NS; g++) begin : g_st
    localparam int MM = g + 1;
    cpu_req_t      cpu [MM];
    cpu_rsp_t      rsp [MM];
    logic [MM-1:0] refresh, ref_ack, pio_cs_n, bus_owner;
    logic          gpib_cs_n, dc_n;
    cbus_t         cbus, fill_bus, next_bus;
    cbus_rsp_t     own_rsp, next_rsp, fill_rsp, next_own_rsp;
    logic          mamb_n, mbma_n;
    int            waits = 0;

    ppu #(.M(MM)) u_pm (.clk, .rst_n, .cpu, .cpu_rsp(rsp), .refresh, .ref_ack, .pio_cs_n,
      .subc_tr2(1'b0), .subc_gpib_cs_n(gpib_cs_n), .subc_dc_n(dc_n), .cbus,
      .own_mm_rsp(own_rsp), .next_mm_rsp(next_rsp), .bus_owner);

    kit_ta2 u_own (.clk, .mamb_n, .mbma_n, .et_n(1'b0),
      .own_bus(cbus), .own_rsp(own_rsp), .up_bus(fill_bus), .up_rsp(fill_rsp));
    kit_ta2 u_next (.clk, .mamb_n, .mbma_n, .et_n(1'b0),
      .own_bus(next_bus), .own_rsp(next_own_rsp), .up_bus(cbus), .up_rsp(next_rsp));

    // refresh requests, held until the DRAM controller takes them
    for (genvar i = 0; i < MM; i++) begin : g_ref
      int cnt;
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) begin refresh[i] <= 1'b0; cnt <= 0; end
        else if (ref_ack[i]) begin refresh[i] <= 1'b0; n_refresh++; end
        else if (cnt == 239) begin refresh[i] <= 1'b1; cnt <= 0; end
        else cnt <= cnt + 1;
    end

    // clocks in which an element waits for the bus while another owns it
    always @(posedge clk) if (rst_n)
      for (int i = 0; i < MM; i++)
        if (cpu[i].req && cpu[i].addr[19] && !rsp[i].ready && bus_owner != 0) begin
          waits++; n_contended++;
        end

    task automatic cycle(input int i, input logic we, input logic [19:0] ad, input logic [15:0] d,
                         output logic [15:0] q);
      cpu[i] = '{req: 1'b1, io: 1'b0, we: we, ube_n: 1'b0, addr: ad, wdata: d};
      #1;
      while (!rsp[i].ready) begin @(negedge clk); #1; end
      q = rsp[i].rdata;
      @(posedge clk);
      #1 cpu[i].req = 1'b0;
      @(negedge clk);
    endtask

    task automatic strip(input int i, input int l, output int first, output int last);
      int p = (l + MM - 1) / MM;
      first = (i * p > 0) ? i * p - 1 : 0;
      last  = ((i + 1) * p + 1 < l) ? (i + 1) * p + 1 : l;   // exclusive
    endtask

    task automatic copy(input int i, input int l, input int si);
      int first, last;
      logic [15:0] q, dummy;
      int t0 = 0, words;
      strip(i, l, first, last);
      words = (last - first) * KW;
      t0 = int'($time / 10);
      for (int y = first; y < last; y++)
        for (int w = 0; w < KW; w++) begin
          cycle(i, 1'b0, 20'hC0000 + 20'(y * 2 * KW + 2 * w), 16'h0, q);
          cycle(i, 1'b1, 20'h10000 + 20'((y - first) * 2 * KW + 2 * w), q, dummy);
        end
      cpw[g][si][i] = real'(int'($time / 10) - t0) / real'(words);
      // read back from local memory
      for (int y = first; y < last; y++)
        for (int w = 0; w < KW; w++) begin
          cycle(i, 1'b0, 20'h10000 + 20'((y - first) * 2 * KW + 2 * w), 16'h0, q);
          checks++;
          if (q !== {pix(y, 2 * w + 1, l), pix(y, 2 * w, l)}) begin
            failures++;
            if (failures < 20)
              $display("FAIL M=%0d L=%0d element %0d line %0d word %0d: %h", MM, l, i, y, w, q);
          end
        end
    endtask

    // 3 x 3 operation op over the element's own lines, from its local copy;
    // result lines go to the next module at 80000h + op * 64000 (block M2 in
    // phase A). Border pixels of the image are passed through.
    task automatic process(input int i, input int l, input int first, input int op);
      int p = (l + MM - 1) / MM;
      int y0 = i * p, y1 = ((i + 1) * p < l) ? (i + 1) * p : l;
      logic [19:0] base = 20'h80000 + 20'(op * 64000);
      logic [15:0] win [3][3];              // [row][word w-1, w, w+1]
      logic [15:0] q, dummy;
      for (int y = y0; y < y1; y++) begin
        for (int w = 0; w < KW; w++) begin
          logic [7:0] o [2];
          if (y == 0 || y == l - 1) begin
            cycle(i, 1'b0, 20'h10000 + 20'((y - first) * 2 * KW + 2 * w), 16'h0, q);
            o[0] = q[7:0]; o[1] = q[15:8];
          end else begin
            for (int r = 0; r < 3; r++) begin
              if (w == 0) begin
                win[r][1] = 16'h0;
                cycle(i, 1'b0, 20'h10000 + 20'((y - 1 + r - first) * 2 * KW), 16'h0, win[r][2]);
              end
              win[r][0] = win[r][1];
              win[r][1] = win[r][2];
              if (w < KW - 1)
                cycle(i, 1'b0, 20'h10000 + 20'((y - 1 + r - first) * 2 * KW + 2 * w + 2), 16'h0, win[r][2]);
            end
            for (int k = 0; k < 2; k++) begin
              automatic int x = 2 * w + k;
              if (x == 0 || x == 2 * KW - 1) o[k] = win[1][1][8*k +: 8];
              else begin
                automatic int v [3][3];
                for (int r = 0; r < 3; r++)
                  for (int dx = -1; dx <= 1; dx++) begin
                    automatic int xx = x + dx;
                    v[r][dx + 1] = int'(win[r][xx / 2 - w + 1][8*(xx%2) +: 8]);
                  end
                o[k] = kernel(op, v);
              end
            end
          end
          cycle(i, 1'b1, base + 20'(y * 2 * KW + 2 * w), {o[1], o[0]}, dummy);
        end
      end
    endtask

    // gray-level histogram of the element's own lines, from its local copy;
    // the 256 counts go to the next module at B0000h + 512 * element
    task automatic histogram(input int i, input int l, input int first);
      int p = (l + MM - 1) / MM;
      int y0 = i * p, y1 = ((i + 1) * p < l) ? (i + 1) * p : l;
      int h [256];
      logic [15:0] q, dummy;
      for (int b = 0; b < 256; b++) h[b] = 0;
      for (int y = y0; y < y1; y++)
        for (int w = 0; w < KW; w++) begin
          cycle(i, 1'b0, 20'h10000 + 20'((y - first) * 2 * KW + 2 * w), 16'h0, q);
          h[q[7:0]]++;
          h[q[15:8]]++;
        end
      for (int b = 0; b < 256; b++)
        cycle(i, 1'b1, 20'hB0000 + 20'(i * 512 + 2 * b), 16'(h[b]), dummy);
    endtask

    initial begin
      fill_bus = CBUS_IDLE; next_bus = CBUS_IDLE;
      for (int i = 0; i < MM; i++) cpu[i] = '0;
      {mamb_n, mbma_n} = 2'b10;              // phase B
      #100;                                  // reset is over by then
      @(negedge clk);
      for (int si = 0; si < NL; si++) begin
        automatic int l = LINES[si];
        // 1. the unit before the stage delivers the image (phase B, upper port, M1)
        {mamb_n, mbma_n} = 2'b10;
        for (int y = 0; y < l; y++)
          for (int w = 0; w < KW; w++) begin
            fill_bus = '{cyc: 1'b1, we: 1'b1, ube_n: 1'b0,
                         addr: 20'hC0000 + 20'(y * 2 * KW + 2 * w),
                         wdata: {pix(y, 2 * w + 1, l), pix(y, 2 * w, l)}};
            @(negedge clk);
          end
        fill_bus = CBUS_IDLE;
        // 2./3. phase A: all elements copy their strips at once
        @(negedge clk) {mamb_n, mbma_n} = 2'b01;
        @(negedge clk);
        for (int i = 0; i < MM; i++) begin
          automatic int ii = i;
          fork copy(ii, l, si); join_none
        end
        wait fork;
        // the processing experiment, on the full 320 x 200 image
        if (l == 200) begin
          for (int i = 0; i < MM; i++) begin
            automatic int ii = i;
            fork
              begin
                automatic int first, last;
                strip(ii, l, first, last);
                for (int op = 0; op < 3; op++) process(ii, l, first, op);
                histogram(ii, l, first);
              end
            join_none
          end
          wait fork;
          // phase B: the result is now on the next module's own port
          @(negedge clk) {mamb_n, mbma_n} = 2'b10;
          @(negedge clk);
          for (int op = 0; op < 3; op++)
            for (int y = 0; y < l; y++)
              for (int w = 0; w < KW; w++) begin
                logic [7:0] e [2];
                next_bus = '{cyc: 1'b1, we: 1'b0, ube_n: 1'b0,
                             addr: 20'h80000 + 20'(op * 64000 + y * 2 * KW + 2 * w), wdata: 16'h0};
                #1;
                for (int k = 0; k < 2; k++) e[k] = op_ref(op, y, 2 * w + k, l);
                checks++;
                if (!next_own_rsp.drive || next_own_rsp.rdata !== {e[1], e[0]}) begin
                  failures++;
                  if (failures < 20)
                    $display("FAIL M=%0d op %0d line %0d word %0d: %h expected %h", MM, op, y, w,
                             next_own_rsp.rdata, {e[1], e[0]});
                end
                @(negedge clk);
              end
          // merge the partial histograms
          begin
            int ref_h [256], got;
            for (int b = 0; b < 256; b++) ref_h[b] = 0;
            for (int y = 0; y < l; y++)
              for (int x = 0; x < 2 * KW; x++) ref_h[pix(y, x, l)]++;
            for (int b = 0; b < 256; b++) begin
              got = 0;
              for (int i = 0; i < MM; i++) begin
                next_bus = '{cyc: 1'b1, we: 1'b0, ube_n: 1'b0,
                             addr: 20'hB0000 + 20'(i * 512 + 2 * b), wdata: 16'h0};
                #1 got += int'(next_own_rsp.rdata);
                @(negedge clk);
              end
              checks++;
              if (got != ref_h[b]) begin
                failures++;
                $display("FAIL M=%0d histogram bin %0d: %0d expected %0d", MM, b, got, ref_h[b]);
              end
            end
          end
          next_bus = CBUS_IDLE;
          n_processed++;
        end
      end
      checks++;
      if (MM == 1 && waits != 0) begin
        failures++; $display("FAIL a single element waited %0d clocks for the bus", waits);
      end
      if (MM > 1 && waits == 0) begin
        failures++; $display("FAIL no bus contention with %0d elements", MM);
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done);
    for (int si = 0; si < NL; si++) begin
      $display("320 x %0d bytes, clocks per word (rows: M, columns: SUBC, SMPU1..):", LINES[si]);
      for (int m = 0; m < NS; m++) begin
        automatic string s = $sformatf("  M=%0d", m + 1);
        for (int i = 0; i <= m; i++) s = {s, $sformatf(" %6.2f", cpw[m][si][i])};
        $display("%s", s);
      end
      for (int m = 1; m < NS; m++) begin
        checks++;
        if (cpw[m][si][0] > cpw[0][si][0] + 1.0) begin
          failures++;
          $display("FAIL L=%0d: SUBC at M=%0d takes %f clocks/word, alone %f", LINES[si], m + 1,
                   cpw[m][si][0], cpw[0][si][0]);
        end
      end
      checks++;
      if (cpw[NS-1][si][NS-1] <= cpw[NS-1][si][0]) begin
        failures++;
        $display("FAIL L=%0d: lowest-priority element not slower than the SUBC", LINES[si]);
      end
    end
    checks++;
    if (n_processed != NS) begin failures++; $display("FAIL processing ran in %0d of %0d stages", n_processed, NS); end
    checks++;
    if (n_refresh == 0) begin failures++; $display("FAIL no refresh happened"); end
    $display("refresh cycles %0d, contended bus-wait clocks %0d", n_refresh, n_contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
