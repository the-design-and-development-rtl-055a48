// sram_bank: one 256 KB block (M1 or M2) of a memory module's common image memory.
//
// Eight 32K x 8 static RAMs, selected by cm_chip_select from A19..A16, A0 and
// UBE_n. A chip whose select is low takes A15..A1 as its address; a write (we
// with cyc) stores the chip's byte lane at the clock edge, a read returns the
// selected chips' bytes combinationally (the chips are asynchronous SRAMs and a
// whole common-bus cycle fits in one clock). cyc is the cycle strobe that the
// active bus switch passes on; without it no chip is written. rdata carries
// the low-byte chips on D7..D0 and the high-byte chips on D15..D8.
//
// The block organisation and decode follow the memory board; storing the eight
// chips as two byte lanes of one array is this design's.
module sram_bank #(
  parameter bit          BLOCK_A18  = 1'b0,   // 0: M2 (80000h), 1: M1 (C0000h)
  parameter int unsigned CHIP_WORDS = 32768   // bytes per SRAM chip
) (
  input  logic        clk,
  input  logic        cyc,
  input  logic        we,
  input  logic        ube_n,
  input  logic [19:0] a,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        hit     // this block decoded the address
);

  localparam int unsigned OW = $clog2(CHIP_WORDS);

  logic [7:0]      cs_n;
  logic            lo_sel, hi_sel;
  logic [1:0]      seg;
  logic [OW+1:0]   idx;      // {segment, offset within chip}
  logic [7:0]      lo_mem [4*CHIP_WORDS];   // even chips
  logic [7:0]      hi_mem [4*CHIP_WORDS];   // odd chips

  cm_chip_select #(.BLOCK_A18(BLOCK_A18)) u_cs (
    .a     (a[19:16]),
    .a0    (a[0]),
    .ube_n (ube_n),
    .cs_n  (cs_n)
  );

  always_comb begin
    seg    = a[17:16];
    idx    = {seg, a[OW:1]};
    lo_sel = !cs_n[{seg, 1'b0}];
    hi_sel = !cs_n[{seg, 1'b1}];
    hit    = a[19] && (a[18] == BLOCK_A18);
  end

  always_ff @(posedge clk) begin
    if (cyc && we && lo_sel) lo_mem[idx] <= wdata[7:0];
    if (cyc && we && hi_sel) hi_mem[idx] <= wdata[15:8];
  end

  assign rdata = {hi_mem[idx], lo_mem[idx]};

endmodule
