// cm_chip_select: chip selects of one 256 KB common image memory block.
//
// A block is eight 32K x 8 static RAM chips: four 64 KB segments, each a pair of
// a low-byte chip and a high-byte chip. The block answers a 256 KB window of the
// upper address half chosen by BLOCK_A18: 0 for 80000h-BFFFFh (block M2),
// 1 for C0000h-FFFFFh (block M1). Within the window A17..A16 pick the segment,
// A0 = 0 selects the segment's low-byte chip and UBE_n = 0 its high-byte chip.
//
//   cs_n[2*s]   = !(A19 & (A18 == BLOCK_A18) & (A17..A16 == s) & !A0)
//   cs_n[2*s+1] = !(A19 & (A18 == BLOCK_A18) & (A17..A16 == s) & !UBE_n)
//
// Combinational. The equations are those of the memory boards' two chip-select
// devices, one per block; the parameter merges the two into one module.
module cm_chip_select #(
  parameter bit BLOCK_A18 = 1'b0
) (
  input  logic [19:16] a,      // A19..A16 of the memory module's address bus
  input  logic         a0,
  input  logic         ube_n,
  output logic [7:0]   cs_n
);

  always_comb begin
    for (int s = 0; s < 4; s++) begin
      cs_n[2*s]   = !(a[19] && (a[18] == BLOCK_A18) && (a[17:16] == 2'(s)) && !a0);
      cs_n[2*s+1] = !(a[19] && (a[18] == BLOCK_A18) && (a[17:16] == 2'(s)) && !ube_n);
    end
  end

endmodule
