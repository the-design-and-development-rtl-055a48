// io_decode: I/O chip selects and CPU READY of a CPU board.
//
// A small sum-of-products block that decodes the CPU address into the chip
// selects of the GP-IB controller and of the programmable parallel interface,
// passes the GP-IB controller's transceiver strobe to the bus transceivers, and
// forms the CPU's READY input.
//
//   gpib_cs  = !A15 & A8 & !A6 & !A5 &  A4 & !A0   (even ports 110h-11Eh)
//   pio_cs   = !A15 & A8 & !A6 & !A5 & !A4 & !A0   (even ports 100h-10Eh)
//   dc       = tr2                                 (transceiver enable)
//   ready    = !A19 | (A19 & aen)
//
// READY is given at once for the lower half of the address space (the local
// memory and all I/O ports) and, for the upper half, only once the board's bus
// arbiter has been granted the common bus (aen). As on the boards, the chip
// selects are plain address decodes; the I/O read and write strobes that qualify
// them go to the peripheral chips directly. Purely combinational. All
// equations follow the boards' logic equations.
module io_decode (
  input  logic        aen,       // common bus granted to this board (active high)
  input  logic [19:0] a,         // CPU address A19..A0
  input  logic        tr2,       // GP-IB controller transceiver strobe
  output logic        gpib_cs_n,
  output logic        pio_cs_n,
  output logic        dc_n,      // GP-IB bus transceiver enable, active low
  output logic        ready
);

  always_comb begin
    gpib_cs_n = !(!a[15] && a[8] && !a[6] && !a[5] &&  a[4] && !a[0]);
    pio_cs_n  = !(!a[15] && a[8] && !a[6] && !a[5] && !a[4] && !a[0]);
    dc_n      = !tr2;
    ready     = !a[19] || (a[19] && aen);
  end

endmodule
