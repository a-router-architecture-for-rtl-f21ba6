// rt_clock: the router's real-time clock.
//
// A TBITS-wide counter that advances by one every TICK_CYCLES clock cycles,
// i.e. once per time-constrained packet transmission time (20 byte times at
// one byte per cycle). Logical arrival times and deadlines are kept modulo
// 2^TBITS and compared against this value. Routers in a machine are assumed to
// run synchronised clocks; this block starts at zero after reset, and `tick`
// pulses in the cycle in which `t` changes. The counter width and tick period
// follow the document; the reset value is this design's choice.
module rt_clock #(
  parameter int TBITS       = 8,
  parameter int TICK_CYCLES = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [TBITS-1:0] t,
  output logic             tick
);
  localparam int PW = (TICK_CYCLES > 1) ? $clog2(TICK_CYCLES) : 1;
  logic [PW-1:0] pre;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0;
      t   <= '0;
    end else if (pre == PW'(TICK_CYCLES - 1)) begin
      pre <= '0;
      t   <= t + 1'b1;
    end else begin
      pre <= pre + 1'b1;
    end
  end

  assign tick = (pre == '0);
endmodule
