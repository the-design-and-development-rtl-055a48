// kit_ta2: memory module (MM), the time-shared dual-port memory between stages.
//
// Two 256 KB static RAM blocks, M1 (C0000h-FFFFFh) and M2 (80000h-BFFFFh), a
// 16 KB start-up ROM, and bus switches to two ports: own_bus from the stage this
// module belongs to and up_bus from the stage (or input unit) before it. The
// phase inputs swap the blocks between the ports, so one stage can read the
// block the previous stage has just filled while that stage fills the other:
//
//   phase A (mamb_n low): own_bus -> M1, up_bus -> M2
//   phase B (mbma_n low): own_bus -> M2, up_bus -> M1
//
// While et_n is high (start-up) the image memory is switched off and every
// common-bus read on the own port returns the ROM. A port only answers (drive)
// when one of its switches or the ROM decoded the cycle; the other block is cut
// off from it, so the two ports never meet.
//
// Timing: a common-bus cycle takes one clock: writes are stored at the clock
// edge ending it, read data is valid within it. Parameters scale the SRAM chip
// size and select the ROM contents file. The block structure, address map and
// switch rules follow the memory board; one clock per bus cycle is this
// design's.
module kit_ta2
  import higips_pkg::*;
#(
  parameter int unsigned CHIP_WORDS = 32768,  // bytes per SRAM chip (32K x 8)
  parameter int unsigned CROM_WORDS = 8192,   // 16-bit words of start-up ROM
  parameter string       CROM_FILE  = ""
) (
  input  logic      clk,
  input  logic      mamb_n,
  input  logic      mbma_n,
  input  logic      et_n,
  input  cbus_t     own_bus,
  output cbus_rsp_t own_rsp,
  input  cbus_t     up_bus,
  output cbus_rsp_t up_rsp
);

  // Switch enables of both ports
  logic o_al, o_ah, o_bl, o_bh, o_rl, o_rh;
  logic u_al, u_ah, u_bl, u_bh, u_rl_unused, u_rh_unused;

  bus_switch_ctrl #(.UPPER(1'b0)) u_bsd_own (
    .a0(own_bus.addr[0]), .a19(own_bus.addr[19]), .a18(own_bus.addr[18]),
    .ube_n(own_bus.ube_n), .mamb_n(mamb_n), .mbma_n(mbma_n), .et_n(et_n),
    .oe_a_l_n(o_al), .oe_a_h_n(o_ah), .oe_b_l_n(o_bl), .oe_b_h_n(o_bh),
    .oe_crom_l_n(o_rl), .oe_crom_h_n(o_rh)
  );

  bus_switch_ctrl #(.UPPER(1'b1)) u_bsd_up (
    .a0(up_bus.addr[0]), .a19(up_bus.addr[19]), .a18(up_bus.addr[18]),
    .ube_n(up_bus.ube_n), .mamb_n(mamb_n), .mbma_n(mbma_n), .et_n(et_n),
    .oe_a_l_n(u_al), .oe_a_h_n(u_ah), .oe_b_l_n(u_bl), .oe_b_h_n(u_bh),
    .oe_crom_l_n(u_rl_unused), .oe_crom_h_n(u_rh_unused)
  );

  // Which port each block is switched to in this cycle
  logic own_m1, own_m2, up_m1, up_m2, own_rom;
  always_comb begin
    own_m1  = own_bus.cyc && !(o_al && o_ah);   // phase-A switch of own port
    own_m2  = own_bus.cyc && !(o_bl && o_bh);   // phase-B switch of own port
    up_m2   = up_bus.cyc  && !(u_al && u_ah);   // phase-A switch of upper port
    up_m1   = up_bus.cyc  && !(u_bl && u_bh);   // phase-B switch of upper port
    own_rom = own_bus.cyc && !(o_rl && o_rh);
  end

  cbus_t m1_bus, m2_bus;
  always_comb begin
    m1_bus = own_m1 ? own_bus : (up_m1 ? up_bus : CBUS_IDLE);
    m2_bus = own_m2 ? own_bus : (up_m2 ? up_bus : CBUS_IDLE);
  end

  logic [15:0] m1_rdata, m2_rdata, rom_rdata;
  logic        m1_hit_unused, m2_hit_unused;

  sram_bank #(.BLOCK_A18(1'b1), .CHIP_WORDS(CHIP_WORDS)) u_m1 (
    .clk(clk), .cyc(m1_bus.cyc), .we(m1_bus.we), .ube_n(m1_bus.ube_n),
    .a(m1_bus.addr), .wdata(m1_bus.wdata), .rdata(m1_rdata), .hit(m1_hit_unused)
  );

  sram_bank #(.BLOCK_A18(1'b0), .CHIP_WORDS(CHIP_WORDS)) u_m2 (
    .clk(clk), .cyc(m2_bus.cyc), .we(m2_bus.we), .ube_n(m2_bus.ube_n),
    .a(m2_bus.addr), .wdata(m2_bus.wdata), .rdata(m2_rdata), .hit(m2_hit_unused)
  );

  crom #(.WORDS(CROM_WORDS), .INIT_FILE(CROM_FILE)) u_crom (
    .a(own_bus.addr[$clog2(CROM_WORDS):1]), .oe_l_n(o_rl), .oe_h_n(o_rh),
    .rdata(rom_rdata)
  );

  always_comb begin
    own_rsp = CRSP_IDLE;
    if (own_m1)       own_rsp = '{drive: 1'b1, rdata: m1_rdata};
    else if (own_m2)  own_rsp = '{drive: 1'b1, rdata: m2_rdata};
    else if (own_rom) own_rsp = '{drive: 1'b1, rdata: rom_rdata};
    up_rsp = CRSP_IDLE;
    if (up_m1)        up_rsp  = '{drive: 1'b1, rdata: m1_rdata};
    else if (up_m2)   up_rsp  = '{drive: 1'b1, rdata: m2_rdata};
  end

  // The phase signals are complementary once start-up is over, so a block
  // never sees both ports in one cycle.
  assert property (@(posedge clk) !(own_m1 && up_m1) && !(own_m2 && up_m2));

endmodule
