// dram_array: the local memory of a CPU board, 256K words of 16 bits (512 KB).
//
// Sixteen 256K x 1 DRAM chips in parallel, seen as one array with a multiplexed
// 9-bit address. The row address is taken when RAS_n falls; while RAS_n and a
// byte's CAS_n are low the word at {column, row} is read out, and with WE_n low
// the enabled bytes are written at the clock edge. A RAS-only cycle (CAS_n high)
// refreshes and changes nothing. The contents are not initialised.
//
// Interface and timing follow dram_ctrl: one clock with RAS_n low and the row
// on ma, then one clock with the column on ma and CAS_n low. Modelling the chips
// as a clocked array is this design's choice.
module dram_array #(
  parameter int unsigned ROW_BITS = 9,
  parameter int unsigned COL_BITS = 9
) (
  input  logic                clk,
  input  logic                ras_n,
  input  logic                cash_n,
  input  logic                casl_n,
  input  logic                we_n,
  input  logic [ROW_BITS-1:0] ma,
  input  logic [15:0]         din,
  output logic [15:0]         dout
);

  localparam int unsigned WORDS = 1 << (ROW_BITS + COL_BITS);

  logic [15:0]         mem [WORDS];
  logic                ras_q;
  logic [ROW_BITS-1:0] row;
  logic [ROW_BITS+COL_BITS-1:0] waddr;

  // Column bits come from the narrower of the two multiplexed addresses.
  assign waddr = {ma[COL_BITS-1:0], row};

  always_ff @(posedge clk) begin
    ras_q <= ras_n;
    if (!ras_n && ras_q) row <= ma;
    if (!ras_n && !ras_q && !we_n) begin
      if (!casl_n) mem[waddr][7:0]  <= din[7:0];
      if (!cash_n) mem[waddr][15:8] <= din[15:8];
    end
  end

  assign dout = mem[waddr];

endmodule
