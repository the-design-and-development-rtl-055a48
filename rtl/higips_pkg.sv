// higips_pkg: types and constants shared by the HIGIPS pipeline-of-multiprocessors
// glue logic.
//
// The processing elements are 16-bit V50-class CPUs with a 20-bit (1 MB) address
// space. The lower half (A19 = 0) is the CPU's private DRAM, the upper half
// (A19 = 1) is the stage's common bus: 80000h-BFFFFh addresses memory block M2 of
// a memory module, C0000h-FFFFFh block M1, and with the start-up ROM enabled every
// common address reads the ROM instead. Byte lanes follow the 8086 convention:
// A0 = 0 enables the low byte (D7-D0), UBE_n = 0 enables the high byte (D15-D8).
//
// The CPU itself is not part of this RTL. Its bus is represented by a simple
// synchronous request/ready pair (cpu_req_t / cpu_rsp_t): the CPU raises req
// with a stable address, data and direction, and holds them until it samples
// ready = 1 at a rising clock edge. Read data is valid in that same cycle.
// This request/ready form of the CPU bus is a choice of this design; the
// address map, the byte-lane rules and the READY rule (local cycles ready
// at once, common cycles once the bus is granted) are those of the boards.
package higips_pkg;

  localparam int unsigned AW = 20;   // V50 address bus A19..A0
  localparam int unsigned DW = 16;   // data bus D15..D0

  // A CPU bus cycle as seen on the CPU board's local bus.
  typedef struct packed {
    logic          req;    // a bus cycle is in progress; held until ready
    logic          io;     // 1: I/O cycle (IORD/IOWR), 0: memory cycle
    logic          we;     // 1: write, 0: read
    logic          ube_n;  // upper byte enable, active low
    logic [AW-1:0] addr;   // A19..A0 (A0 = 0 enables the low byte)
    logic [DW-1:0] wdata;  // write data
  } cpu_req_t;

  typedef struct packed {
    logic          ready;  // the cycle completes at this clock edge
    logic [DW-1:0] rdata;  // read data, valid while ready = 1
  } cpu_rsp_t;

  // One cycle on a stage's common bus, driven by the master that owns it.
  typedef struct packed {
    logic          cyc;    // a master owns the bus and runs a cycle this clock
    logic          we;
    logic          ube_n;
    logic [AW-1:0] addr;
    logic [DW-1:0] wdata;
  } cbus_t;

  // Answer of one memory module port to a common-bus cycle.
  typedef struct packed {
    logic          drive;  // this port decoded the cycle and drives rdata
    logic [DW-1:0] rdata;
  } cbus_rsp_t;

  // Phase of the bus switches. Phase A: MAMB_n low, a stage reaches its own
  // module's M1 and the next module's M2. Phase B: MBMA_n low, its own M2 and
  // the next module's M1.
  typedef enum logic {
    PHASE_A = 1'b0,
    PHASE_B = 1'b1
  } phase_e;

  localparam cbus_t     CBUS_IDLE = '0;
  localparam cbus_rsp_t CRSP_IDLE = '0;

endpackage
