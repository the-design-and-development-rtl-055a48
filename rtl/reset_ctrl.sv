// reset_ctrl: power-on and push-button reset of the system.
//
// Two sources: a power-on reset and a reset switch. The switch is a change-over
// contact; an RS flip-flop set by its normally-open contact and cleared by its
// normally-closed contact ignores the bounce of either contact, so one press
// gives one clean reset. Either source, stretched to at least RST_CYCLES clocks
// after it ends, drives RESET (active high) and RESET_n (active low) to all
// boards.
//
// Inputs are asynchronous; they are taken in through two flip-flops. The
// RS-latch debouncer follows the boards; the stretch counter and its length
// are this design's.
module reset_ctrl #(
  parameter int unsigned RST_CYCLES = 16
) (
  input  logic clk,
  input  logic por_n,      // power-on reset, active low
  input  logic sw_no_n,    // reset switch, normally-open contact (low when pressed)
  input  logic sw_nc_n,    // reset switch, normally-closed contact (low when released)
  output logic reset,
  output logic reset_n
);

  logic [1:0] no_s, nc_s;
  logic       pressed;
  logic [$clog2(RST_CYCLES+1)-1:0] cnt;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      no_s    <= 2'b11;
      nc_s    <= 2'b00;
      pressed <= 1'b0;
      cnt     <= '0;
      reset   <= 1'b1;
    end else begin
      no_s <= {no_s[0], sw_no_n};
      nc_s <= {nc_s[0], sw_nc_n};
      // RS flip-flop: set by the NO contact, reset by the NC contact
      if (!no_s[1])      pressed <= 1'b1;
      else if (!nc_s[1]) pressed <= 1'b0;
      if (pressed) begin
        cnt   <= '0;
        reset <= 1'b1;
      end else if (32'(cnt) != RST_CYCLES) begin
        cnt   <= cnt + 1'b1;
        reset <= 1'b1;
      end else begin
        reset <= 1'b0;
      end
    end
  end

  assign reset_n = !reset;

endmodule
