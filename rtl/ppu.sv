// ppu: processor module (PM) of one pipeline stage.
//
// M processing elements share the stage's common bus. Element 0 is the
// sub-controller (SUBC), which talks to the system controller over GP-IB and
// hands tasks to the others; elements 1..M-1 are slave processors (SMPU). Each
// element is a CPU board (kit_ta1) whose CPU local bus is a port of this module.
// The boards' bus requests meet in the stage's priority resolver (SUBC highest,
// then SMPU 1, 2, ...); the board granted the bus drives the common bus for one
// word, which reaches the stage's own memory module and the next stage's
// module. The read data comes back from whichever module port decoded the
// address.
//
// Ports are arrays over the M elements. Only the SUBC has a GP-IB controller,
// so only its transceiver strobe and chip select are brought out.
//
// The organisation (one SUBC plus slaves, a shared bus with a parallel priority
// resolver, local memory per element) follows the processor module; M
// defaults to the two elements per stage of the prototype and may go up to 8.
module ppu
  import higips_pkg::*;
#(
  parameter int unsigned M           = 2,  // processing elements in the stage (1..8)
  parameter int unsigned LM_ROW_BITS = 9
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cpu_req_t        cpu     [M],
  output cpu_rsp_t        cpu_rsp [M],
  input  logic [M-1:0]    refresh,
  output logic [M-1:0]    ref_ack,
  output logic [M-1:0]    pio_cs_n,
  input  logic            subc_tr2,
  output logic            subc_gpib_cs_n,
  output logic            subc_dc_n,
  // common bus towards the memory modules
  output cbus_t           cbus,
  input  cbus_rsp_t       own_mm_rsp,    // this stage's module, own port
  input  cbus_rsp_t       next_mm_rsp,   // next module, upper-neighbour port
  output logic [M-1:0]    bus_owner      // which element owns the bus (BUSY)
);

  logic [7:0]   breq_n, bprn_n;
  logic         any_req_unused;
  cbus_t        pe_bus [M];
  cbus_rsp_t    rsp;
  logic [M-1:0] gpib_cs_n, dc_n;
  logic [M-1:0] tr2;

  always_comb begin
    tr2    = '0;
    tr2[0] = subc_tr2;
  end

  assign subc_gpib_cs_n = gpib_cs_n[0];
  assign subc_dc_n      = dc_n[0];

  bus_priority #(.NM(8)) u_prio (
    .breq_n(breq_n), .bprn_n(bprn_n), .any_req(any_req_unused)
  );

  for (genvar i = 0; i < 8; i++) begin : g_unused
    if (i >= M) begin : g_tie
      assign breq_n[i] = 1'b1;
    end
  end

  for (genvar i = 0; i < M; i++) begin : g_pe
    kit_ta1 #(.LM_ROW_BITS(LM_ROW_BITS)) u_pe (
      .clk(clk), .rst_n(rst_n),
      .cpu(cpu[i]), .cpu_rsp(cpu_rsp[i]),
      .refresh(refresh[i]), .ref_ack(ref_ack[i]),
      .tr2(tr2[i]), .gpib_cs_n(gpib_cs_n[i]), .pio_cs_n(pio_cs_n[i]), .dc_n(dc_n[i]),
      .breq_n(breq_n[i]), .bprn_n(bprn_n[i]), .busy(bus_owner[i]),
      .cbus(pe_bus[i]), .cbus_rsp(rsp)
    );
  end

  // The common bus: only the owner's drivers are on, so OR the boards.
  always_comb begin
    cbus = CBUS_IDLE;
    for (int i = 0; i < M; i++) cbus = cbus | pe_bus[i];
  end

  always_comb begin
    rsp = CRSP_IDLE;
    if (own_mm_rsp.drive)       rsp = own_mm_rsp;
    else if (next_mm_rsp.drive) rsp = next_mm_rsp;
  end

  // The 8289-style arbitration must never let two boards own the bus.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(bus_owner));

endmodule
