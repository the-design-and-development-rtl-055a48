// bus_switch_ctrl: enables of a memory module's bus switches and start-up ROM.
//
// A memory module has two 256 KB blocks, M1 (C0000h-FFFFFh, A18 = 1) and M2
// (80000h-BFFFFh, A18 = 0), and two ports: the bus of its own stage and the bus
// of the stage before it (the "upper neighbour"). Each block sits behind two
// bus switches, one per port, and the phase signals decide which one conducts:
//
//   phase A (MAMB_n low):  own stage <-> M1,  upper neighbour <-> M2
//   phase B (MBMA_n low):  own stage <-> M2,  upper neighbour <-> M1
//
// One instance serves one port. For the own port (UPPER = 0) the phase-A switch
// opens for A18 = 1 and the phase-B switch for A18 = 0; for the upper port
// (UPPER = 1) the other way round. Each switch has a low-byte enable (A19 & !A0)
// and a high-byte enable (A19 & !UBE_n). While ET_n is high (start-up) every
// image-memory enable is held off and, on the own port only, the ROM's byte
// enables follow the same byte terms instead.
//
// Combinational, active-low outputs. The terms follow the logic equations of
// the memory board's two bus-switch devices; the upper-port device is read as
// the own-port device with the A18 sense reversed, which is what the phase
// table requires.
module bus_switch_ctrl #(
  parameter bit UPPER = 1'b0        // 0: own-stage port, 1: upper-neighbour port
) (
  input  logic a0,
  input  logic a19,
  input  logic a18,
  input  logic ube_n,
  input  logic mamb_n,              // phase A
  input  logic mbma_n,              // phase B
  input  logic et_n,                // image memory enabled (start-up over)
  output logic oe_a_l_n,            // phase-A switch, low / high byte
  output logic oe_a_h_n,
  output logic oe_b_l_n,            // phase-B switch, low / high byte
  output logic oe_b_h_n,
  output logic oe_crom_l_n,         // start-up ROM, low / high byte
  output logic oe_crom_h_n
);

  logic lo, hi, img, a_blk;

  always_comb begin
    lo    = a19 && !a0;
    hi    = a19 && !ube_n;
    img   = !et_n;
    a_blk = UPPER ? !a18 : a18;     // block the phase-A switch connects to

    oe_a_l_n    = !(img && !mamb_n && lo &&  a_blk);
    oe_a_h_n    = !(img && !mamb_n && hi &&  a_blk);
    oe_b_l_n    = !(img && !mbma_n && lo && !a_blk);
    oe_b_h_n    = !(img && !mbma_n && hi && !a_blk);
    oe_crom_l_n = !(!UPPER && !img && lo);
    oe_crom_h_n = !(!UPPER && !img && hi);
  end

endmodule
