// tc_input: input buffer for the time-constrained virtual channel of one port.
//
// Time-constrained packets are a fixed 20 bytes: connection id, logical
// arrival time at this router, then 18 data bytes. Bytes arriving one per cycle
// are packed into a 10-byte chunk register (byte 0 in bits [7:0]); a full
// chunk moves to a pending register and raises `req` towards the packet-memory
// controller, which takes it by pulsing `gnt`. `first` marks the chunk that
// holds the header. The pending register lets the next chunk assemble while
// the first waits for the shared bus; since the bus serves ten requesters
// round-robin and a chunk takes ten byte times to arrive, one pending chunk is
// enough. Time-constrained traffic uses rate-based flow control, so there is
// no acknowledgement. Chunked storage follows the document; the two-register
// buffer is this design's choice.
module tc_input
  import rt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid,
  input  logic [7:0] data,
  output logic   req,
  output chunk_t chunk,
  output logic   first,
  input  logic   gnt
);
  localparam int CW = $clog2(CHUNK_BYTES);

  chunk_t        asm_q;
  logic [CW-1:0] cnt;
  logic          half;   // 0 while assembling the first chunk of a packet

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_q <= '0;
      cnt   <= '0;
      half  <= 1'b0;
      req   <= 1'b0;
      chunk <= '0;
      first <= 1'b0;
    end else begin
      if (gnt) req <= 1'b0;
      if (valid) begin
        asm_q[8*cnt +: 8] <= data;
        if (cnt == CW'(CHUNK_BYTES - 1)) begin
          cnt   <= '0;
          half  <= ~half;
          req   <= 1'b1;
          first <= ~half;
          chunk <= asm_q;
          chunk[8*(CHUNK_BYTES-1) +: 8] <= data;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (valid && cnt == CW'(CHUNK_BYTES - 1)) |-> (!req || gnt));
endmodule
