// crom: the 16 KB common start-up ROM of a memory module.
//
// Two 8K x 8 EPROMs (low and high byte) holding the monitor that every CPU of
// the stage copies into its local memory after power-on or reset. While the
// ROM is enabled it answers the whole common address range, indexed by
// A13..A1, so its image appears repeatedly up to the top 16 KB (FC000h-FFFFFh)
// where the CPUs start. oe_l_n / oe_h_n enable the byte lanes; a disabled lane
// reads FFh like an undriven, pulled-up bus.
//
// The contents are loaded from INIT_FILE ($readmemh, one 16-bit word per
// line). With no file given the ROM reads as erased (FFFFh). The monitor
// program itself is not part of this design.
module crom #(
  parameter int unsigned WORDS     = 8192,
  parameter string       INIT_FILE = ""
) (
  input  logic [$clog2(WORDS):1] a,
  input  logic                   oe_l_n,
  input  logic                   oe_h_n,
  output logic [15:0]            rdata
);

  logic [15:0] rom [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) rom[i] = 16'hFFFF;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_comb begin
    rdata = rom[a];
    if (oe_l_n) rdata[7:0]  = 8'hFF;
    if (oe_h_n) rdata[15:8] = 8'hFF;
  end

endmodule
