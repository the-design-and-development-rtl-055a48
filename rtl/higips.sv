// higips: a pipeline of shared-bus multiprocessors for real-time image processing.
//
// Frames flow through N processing stages. Each stage (ppu) is a small
// multiprocessor of M CPU boards on a common bus. Between neighbouring stages,
// and between the input unit and stage 1 and between stage N and the output
// unit, sits a memory module (kit_ta2) with two 256 KB blocks that act as a
// time-shared dual-port memory: in one phase a stage reads its input frame from
// one block of its own module while writing its result into a block of the next
// module; in the other phase the blocks swap ports. When every stage's
// sub-controller has reported that it is done (PB1), the bus switches of all
// modules change phase at once (stage_sync), so every frame moves one stage on
// without a copy. When every sub-controller has halted (PB0), an NMI restarts
// all stages (restart_ctrl).
//
//   PIC -> MM1 -> PM1 -> MM2 -> PM2 -> ... -> PM N -> MM N+1 -> POC
//          (upper port of MM k: the unit before it; own port: PM k or POC)
//
// The input unit's controller (PIC) and the output unit's controller (POC) are
// CPU boards as well, each alone on its module port. The CPUs, the digitiser
// and frame-buffer boards, the GP-IB controllers, the parallel interfaces and
// the host computer are outside this RTL: the CPU local buses, the parallel
// interface lines PB0/PB1 and the decoded chip selects are ports.
//
// Ports: pe_cpu[s*M + i] is element i of stage s (i = 0 the SUBC). After reset
// the modules are in start-up mode (et_n high: the common bus reads the start-up
// ROM) until every SUBC lowers PB1; then phase A begins. All logic runs on clk.
//
// Defaults are the prototype's: 3 stages of 2 processing elements, 512 KB local
// memory per element, 2 x 256 KB per memory module, 16 KB start-up ROM.
module higips
  import higips_pkg::*;
#(
  parameter int unsigned N           = 3,      // pipeline stages
  parameter int unsigned M           = 2,      // processing elements per stage
  parameter int unsigned LM_ROW_BITS = 9,      // local DRAM: 2^(2*bits) words
  parameter int unsigned CHIP_WORDS  = 32768,  // SRAM chip size in bytes
  parameter int unsigned CROM_WORDS  = 8192,   // start-up ROM words
  parameter string       CROM_FILE   = "",
  parameter int unsigned RST_CYCLES  = 16
) (
  input  logic            clk,
  input  logic            por_n,
  input  logic            sw_no_n,
  input  logic            sw_nc_n,
  output logic            reset_n,
  // processing elements of all stages
  input  cpu_req_t        pe_cpu      [N*M],
  output cpu_rsp_t        pe_rsp      [N*M],
  input  logic [N*M-1:0]  pe_refresh,
  output logic [N*M-1:0]  pe_ref_ack,
  output logic [N*M-1:0]  pe_pio_cs_n,
  output logic [N*M-1:0]  pe_bus_owner,
  // sub-controllers: GP-IB and parallel-port lines
  input  logic [N-1:0]    subc_tr2,
  output logic [N-1:0]    subc_gpib_cs_n,
  output logic [N-1:0]    subc_dc_n,
  input  logic [N-1:0]    subc_pb0,
  input  logic [N-1:0]    subc_pb1,
  output logic            nmi,
  // input unit controller
  input  cpu_req_t        pic_cpu,
  output cpu_rsp_t        pic_rsp,
  input  logic            pic_refresh,
  input  logic            pic_tr2,
  output logic            pic_gpib_cs_n,
  output logic            pic_pio_cs_n,
  // output unit controller
  input  cpu_req_t        poc_cpu,
  output cpu_rsp_t        poc_rsp,
  input  logic            poc_refresh,
  input  logic            poc_tr2,
  output logic            poc_gpib_cs_n,
  output logic            poc_pio_cs_n,
  // bus-switch state
  output logic            mamb_n,
  output logic            mbma_n,
  output logic            et_n,
  output phase_e          phase
);

  logic reset_unused;

  reset_ctrl #(.RST_CYCLES(RST_CYCLES)) u_rst (
    .clk(clk), .por_n(por_n), .sw_no_n(sw_no_n), .sw_nc_n(sw_nc_n),
    .reset(reset_unused), .reset_n(reset_n)
  );

  stage_sync #(.NST(N)) u_sync (
    .clk(clk), .rst_n(reset_n), .pb1(subc_pb1),
    .mamb_n(mamb_n), .mbma_n(mbma_n), .et_n(et_n), .phase(phase)
  );

  restart_ctrl #(.NST(N)) u_restart (
    .clk(clk), .rst_n(reset_n), .pb0(subc_pb0), .nmi(nmi)
  );

  // Memory-module ports: own side and upper-neighbour side of each module
  cbus_t     mm_own_bus [N+1];
  cbus_t     mm_up_bus  [N+1];
  cbus_rsp_t mm_own_rsp [N+1];
  cbus_rsp_t mm_up_rsp  [N+1];

  for (genvar k = 0; k <= N; k++) begin : g_mm
    kit_ta2 #(.CHIP_WORDS(CHIP_WORDS), .CROM_WORDS(CROM_WORDS), .CROM_FILE(CROM_FILE)) u_mm (
      .clk(clk), .mamb_n(mamb_n), .mbma_n(mbma_n), .et_n(et_n),
      .own_bus(mm_own_bus[k]), .own_rsp(mm_own_rsp[k]),
      .up_bus(mm_up_bus[k]),   .up_rsp(mm_up_rsp[k])
    );
  end

  // Processing stages
  for (genvar s = 0; s < N; s++) begin : g_stage
    cpu_req_t st_cpu [M];
    cpu_rsp_t st_rsp [M];
    cbus_t    st_bus;

    for (genvar i = 0; i < M; i++) begin : g_map
      assign st_cpu[i]       = pe_cpu[s*M + i];
      assign pe_rsp[s*M + i] = st_rsp[i];
    end

    ppu #(.M(M), .LM_ROW_BITS(LM_ROW_BITS)) u_pm (
      .clk(clk), .rst_n(reset_n),
      .cpu(st_cpu), .cpu_rsp(st_rsp),
      .refresh(pe_refresh[s*M +: M]), .ref_ack(pe_ref_ack[s*M +: M]),
      .pio_cs_n(pe_pio_cs_n[s*M +: M]),
      .subc_tr2(subc_tr2[s]), .subc_gpib_cs_n(subc_gpib_cs_n[s]), .subc_dc_n(subc_dc_n[s]),
      .cbus(st_bus), .own_mm_rsp(mm_own_rsp[s]), .next_mm_rsp(mm_up_rsp[s+1]),
      .bus_owner(pe_bus_owner[s*M +: M])
    );

    assign mm_own_bus[s]  = st_bus;
    assign mm_up_bus[s+1] = st_bus;
  end

  // Input unit controller: alone on the upper port of the first module
  logic pic_breq_n, pic_bprn_n, pic_any_unused, pic_busy_unused, pic_dc_unused, pic_ack_unused;

  kit_ta1 #(.LM_ROW_BITS(LM_ROW_BITS)) u_pic (
    .clk(clk), .rst_n(reset_n), .cpu(pic_cpu), .cpu_rsp(pic_rsp),
    .refresh(pic_refresh), .ref_ack(pic_ack_unused), .tr2(pic_tr2),
    .gpib_cs_n(pic_gpib_cs_n), .pio_cs_n(pic_pio_cs_n), .dc_n(pic_dc_unused),
    .breq_n(pic_breq_n), .bprn_n(pic_bprn_n), .busy(pic_busy_unused),
    .cbus(mm_up_bus[0]), .cbus_rsp(mm_up_rsp[0])
  );

  bus_priority #(.NM(1)) u_pic_prio (
    .breq_n(pic_breq_n), .bprn_n(pic_bprn_n), .any_req(pic_any_unused)
  );

  // Output unit controller: alone on the own port of the last module
  logic poc_breq_n, poc_bprn_n, poc_any_unused, poc_busy_unused, poc_dc_unused, poc_ack_unused;

  kit_ta1 #(.LM_ROW_BITS(LM_ROW_BITS)) u_poc (
    .clk(clk), .rst_n(reset_n), .cpu(poc_cpu), .cpu_rsp(poc_rsp),
    .refresh(poc_refresh), .ref_ack(poc_ack_unused), .tr2(poc_tr2),
    .gpib_cs_n(poc_gpib_cs_n), .pio_cs_n(poc_pio_cs_n), .dc_n(poc_dc_unused),
    .breq_n(poc_breq_n), .bprn_n(poc_bprn_n), .busy(poc_busy_unused),
    .cbus(mm_own_bus[N]), .cbus_rsp(mm_own_rsp[N])
  );

  bus_priority #(.NM(1)) u_poc_prio (
    .breq_n(poc_breq_n), .bprn_n(poc_bprn_n), .any_req(poc_any_unused)
  );

endmodule
