// dram_ctrl: timing generator and address multiplexer of a CPU board's local DRAM.
//
// The local memory is 512 KB of 256K x 1 DRAM chips (16 of them, one per data
// bit) occupying 00000h-7FFFFh. A memory read or write with A19 = 0 starts an
// access: RAS_n falls with the row address on the multiplexed address lines,
// then the multiplexer strobe SLX switches them to the column address and the
// CAS_n of each enabled byte falls (CASL_n for A0 = 0, CASH_n for UBE_n = 0);
// WE_n follows the CPU's memory write strobe. The access completes (done) while
// CAS_n is low, then RAS_n is held high for the precharge time. A refresh
// request from the CPU's refresh unit runs a RAS-only cycle on the next row of
// an internal 9-bit row counter.
//
// States, one clock each: ROW, COL, then TRP_CYC clocks of precharge. At the
// 16 MHz board clock (62.5 ns) this gives RAS low 125 ns (>= 120 ns), RAS to
// CAS 62.5 ns (>= 22 ns), CAS low 62.5 ns (>= 60 ns) and precharge 125 ns
// (>= 90 ns) for the 120 ns chips used. The row/column split of the word
// address (row = A9..A1, column = A18..A10) is this design's.
//
// On the boards these strobes come from gate delays inside a programmable
// logic device. Here the same sequence is clocked, so a local access takes two
// clocks to done and back-to-back accesses start every 2 + TRP_CYC clocks.
module dram_ctrl #(
  parameter int unsigned TRP_CYC = 2    // RAS precharge, in clocks
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mem_req,   // local memory cycle requested (held until done)
  input  logic        we,
  input  logic        ube_n,
  input  logic [18:0] a,         // A18..A0
  input  logic        refresh,   // refresh request (held until ref_ack)
  output logic        ras_n,
  output logic        cash_n,    // CAS of the odd (high) byte
  output logic        casl_n,    // CAS of the even (low) byte
  output logic        we_n,
  output logic        slx,       // multiplexer strobe: 0 row, 1 column
  output logic [8:0]  ma,        // multiplexed DRAM address
  output logic        done,      // access completes this clock
  output logic        ref_ack    // refresh cycle runs this clock
);

  typedef enum logic [1:0] {S_IDLE, S_ROW, S_COL, S_PRE} state_e;

  state_e      state;
  logic        in_ref;           // current RAS cycle is a refresh
  logic [8:0]  ref_row;
  logic [$clog2(TRP_CYC+1)-1:0] pre_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      in_ref  <= 1'b0;
      ref_row <= '0;
      pre_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (refresh) begin
            state  <= S_ROW;
            in_ref <= 1'b1;
          end else if (mem_req) begin
            state  <= S_ROW;
            in_ref <= 1'b0;
          end
        end
        S_ROW: begin
          if (in_ref) begin
            state   <= S_PRE;
            ref_row <= ref_row + 9'd1;
            pre_cnt <= '0;
          end else begin
            state <= S_COL;
          end
        end
        S_COL: begin
          state   <= S_PRE;
          pre_cnt <= '0;
        end
        S_PRE: begin
          if (32'(pre_cnt) == TRP_CYC - 1) begin
            // precharge over: start the next cycle at once if one waits
            if (refresh) begin
              state  <= S_ROW;
              in_ref <= 1'b1;
            end else if (mem_req) begin
              state  <= S_ROW;
              in_ref <= 1'b0;
            end else begin
              state  <= S_IDLE;
            end
          end else begin
            pre_cnt <= pre_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ras_n   = !(state == S_ROW || state == S_COL);
    slx     = (state == S_COL);
    ma      = in_ref ? ref_row : (slx ? a[18:10] : a[9:1]);
    casl_n  = !(state == S_COL && !a[0]);
    cash_n  = !(state == S_COL && !ube_n);
    we_n    = !(state == S_COL && we);
    done    = (state == S_COL);
    ref_ack = (state == S_ROW) && in_ref;
  end

endmodule
