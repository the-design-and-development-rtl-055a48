// kit_ta1: CPU board of a processing element, less the CPU and its peripherals.
//
// A processing element is a 16-bit CPU with 512 KB of private DRAM in the lower
// half of its 1 MB address space and the stage's common bus in the upper half.
// This module is everything on the board between the CPU's local bus and the
// rest of the system:
//
//   - dram_ctrl + dram_array: the local memory (00000h-7FFFFh);
//   - bus_if: the common-bus arbiter and bus drivers (80000h-FFFFFh);
//   - io_decode: chip selects of the GP-IB controller and parallel interface,
//     and the CPU's READY.
//
// A CPU memory cycle with A19 = 0 runs a DRAM access and completes when the
// column strobe is down (2 clocks, then precharge). A memory cycle with A19 = 1
// asks for the common bus and completes in the clock the bus is owned; its
// read data comes from the stage's memory modules (cbus_rsp). An I/O cycle
// completes at once; the decoded chip selects leave the board, since the GP-IB
// controller and the parallel interface are commercial chips outside this RTL.
//
// READY is the decoder's rule (local and I/O at once, common once granted),
// held back for local memory cycles until the DRAM access is done; that hold is
// needed because the DRAM strobes here are clocked rather than gate delays.
//
// The memory map, the decoder and the DRAM organisation follow the board; the
// request/ready CPU interface and the clocked DRAM sequence are this design's.
module kit_ta1
  import higips_pkg::*;
#(
  parameter int unsigned LM_ROW_BITS = 9     // 256K x 1 DRAM chips: 9 + 9 address bits
) (
  input  logic      clk,
  input  logic      rst_n,
  // CPU local bus
  input  cpu_req_t  cpu,
  output cpu_rsp_t  cpu_rsp,
  input  logic      refresh,     // refresh request of the CPU's refresh unit
  output logic      ref_ack,
  input  logic      tr2,         // GP-IB controller transceiver strobe
  output logic      gpib_cs_n,
  output logic      pio_cs_n,
  output logic      dc_n,
  // stage common bus
  output logic      breq_n,
  input  logic      bprn_n,
  output logic      busy,
  output cbus_t     cbus,
  input  cbus_rsp_t cbus_rsp
);

  // ---- I/O decode and READY --------------------------------------------
  logic aen, pal_ready;

  io_decode u_per (
    .aen(aen), .a(cpu.addr), .tr2(tr2),
    .gpib_cs_n(gpib_cs_n), .pio_cs_n(pio_cs_n), .dc_n(dc_n), .ready(pal_ready)
  );

  // ---- local DRAM -------------------------------------------------------
  logic       local_cycle;
  logic       ras_n, cash_n, casl_n, we_n, lm_done;
  logic [LM_ROW_BITS-1:0] ma;
  logic [15:0] lm_rdata;

  assign local_cycle = cpu.req && !cpu.io && !cpu.addr[19];

  dram_ctrl u_lm2 (
    .clk(clk), .rst_n(rst_n),
    .mem_req(local_cycle), .we(cpu.we), .ube_n(cpu.ube_n), .a(cpu.addr[18:0]),
    .refresh(refresh),
    .ras_n(ras_n), .cash_n(cash_n), .casl_n(casl_n), .we_n(we_n), .slx(),
    .ma(ma), .done(lm_done), .ref_ack(ref_ack)
  );

  dram_array #(.ROW_BITS(LM_ROW_BITS), .COL_BITS(LM_ROW_BITS)) u_lm (
    .clk(clk), .ras_n(ras_n), .cash_n(cash_n), .casl_n(casl_n), .we_n(we_n),
    .ma(ma), .din(cpu.wdata), .dout(lm_rdata)
  );

  // ---- common bus -------------------------------------------------------
  bus_if u_bif (
    .clk(clk), .rst_n(rst_n), .cpu(cpu), .bprn_n(bprn_n),
    .breq_n(breq_n), .aen(aen), .busy(busy), .cbus(cbus)
  );

  // ---- response to the CPU ----------------------------------------------
  always_comb begin
    cpu_rsp.ready = 1'b0;
    cpu_rsp.rdata = '1;
    if (cpu.req) begin
      if (cpu.io) begin
        cpu_rsp.ready = 1'b1;               // peripherals are off this model
      end else if (!cpu.addr[19]) begin
        cpu_rsp.ready = pal_ready && lm_done;
        cpu_rsp.rdata = lm_rdata;
      end else begin
        cpu_rsp.ready = pal_ready;          // = aen
        cpu_rsp.rdata = cbus_rsp.drive ? cbus_rsp.rdata : 16'hFFFF;
      end
    end
  end

endmodule
