// bus_if: common-bus arbiter and bus drivers of one CPU board.
//
// A memory cycle to the upper half of the address space (A19 = 1) goes to the
// stage's common bus. The board then raises BREQ_n towards the stage's priority
// resolver; when its BPRN_n line is low at a clock edge it takes the bus for one
// cycle: AEN is asserted, the latched address, UBE_n and direction and the data
// transceivers drive the common bus (cbus.cyc = 1), and the CPU's READY rises
// in that cycle. The board then lets the bus go again, so that every word moved
// over the common bus is arbitrated on its own. BUSY shows that this board owns
// the bus; the stage ORs the BUSY lines of all boards.
//
// Timing: request in cycle t, earliest ownership (and READY) in cycle t+1. A
// higher-priority request arriving while this board owns the bus takes effect
// only after the owned cycle, because BREQ_n is withdrawn while owning and a new
// owner is chosen only among boards that do not own the bus.
//
// The boards use a commercial bus arbiter plus address latches and data
// transceivers for this; only what they do is described there. The one-word
// ownership and one-cycle transfer here are the simplest behaviour that does it.
module bus_if
  import higips_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  cpu_req_t cpu,       // CPU bus cycle
  input  logic     bprn_n,    // bus priority in from the stage's resolver
  output logic     breq_n,    // bus request out to the resolver
  output logic     aen,       // this board owns the common bus (address enable)
  output logic     busy,      // owner flag, ORed over the stage
  output cbus_t    cbus       // what this board drives on the common bus
);

  logic common_cycle;
  assign common_cycle = cpu.req && !cpu.io && cpu.addr[19];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) aen <= 1'b0;
    else        aen <= !aen && common_cycle && !bprn_n;
  end

  assign breq_n = !(common_cycle && !aen);
  assign busy   = aen;

  always_comb begin
    cbus       = CBUS_IDLE;
    cbus.cyc   = aen;
    cbus.we    = cpu.we;
    cbus.ube_n = cpu.ube_n;
    cbus.addr  = cpu.addr;
    cbus.wdata = cpu.wdata;
    if (!aen) cbus = CBUS_IDLE;   // drivers off the bus when not the owner
  end

endmodule
