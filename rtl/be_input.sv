// be_input: flit input buffer for the best-effort virtual channel of one port.
//
// Best-effort packets are wormhole switched: an x offset byte, a y offset
// byte, a length byte, then `length` data bytes. Arriving bytes are grouped
// into flits of up to five bytes; a flit closes after five bytes or at the
// last byte of the packet, so the final flit may be short. The buffer holds
// BUF_FLITS flits (two, i.e. ten bytes). When the head flit closes, the
// dimension-ordered route is computed from the signed offsets: first x, then
// y, then the local reception port once both are zero. The offset of the
// dimension taken is stepped one towards zero in the flit itself, so the next
// router sees the remaining distance.
//   x > 0 -> port 1 (+x), x < 0 -> port 2 (-x),
//   y > 0 -> port 3 (+y), y < 0 -> port 4 (-y), else port 0.
// The buffered flit at the front is offered on flit/flit_valid with its
// route; `pop` removes it, and one cycle later `ack` pulses so the upstream
// sender may send another flit. The upstream side must not send a flit
// without a credit; overflow is flagged by an assertion. Flit size, buffer
// size, header layout and routing order follow the document; the signed
// offset encoding and the credit protocol are this design's choices.
module be_input
  import rt_pkg::*;
#(
  parameter int BUF_FLITS = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ack,
  output logic       flit_valid,
  output flit_t      flit,
  output logic [2:0] route,
  input  logic       pop
);
  typedef struct packed {
    flit_t      f;
    logic [2:0] route;
  } entry_t;

  localparam int QW = $clog2(BUF_FLITS + 1);
  localparam int PW = (BUF_FLITS > 1) ? $clog2(BUF_FLITS) : 1;

  entry_t       q [BUF_FLITS];
  logic [QW-1:0] count;
  logic [PW-1:0] rd_ptr, wr_ptr;

  // assembly state
  logic [FLIT_BYTES*8-1:0] asm_q;
  logic [2:0]              fill;
  logic [8:0]              pos;      // byte index within the packet
  logic [7:0]              len;
  logic                    asm_head; // flit being assembled is the head flit

  logic [FLIT_BYTES*8-1:0] cur;      // assembly register including this byte
  logic                    last_byte, close;
  entry_t                  new_e;

  always_comb begin
    cur = asm_q;
    cur[8*fill +: 8] = data;
    last_byte = (pos >= 9'd2) && (pos == 9'd2 + 9'(pos == 9'd2 ? data : len));
    close     = valid && (last_byte || fill == 3'(FLIT_BYTES - 1));
    new_e.f.data   = cur;
    new_e.f.nbytes = fill + 3'd1;
    new_e.f.head   = asm_head;
    new_e.f.tail   = last_byte;
    new_e.route    = 3'(PORT_LOCAL);
    if (asm_head) begin
      if (!cur[7] && cur[7:0] != 8'd0) begin
        new_e.route = 3'(PORT_XP); new_e.f.data[7:0] = cur[7:0] - 8'd1;
      end else if (cur[7]) begin
        new_e.route = 3'(PORT_XN); new_e.f.data[7:0] = cur[7:0] + 8'd1;
      end else if (!cur[15] && cur[15:8] != 8'd0) begin
        new_e.route = 3'(PORT_YP); new_e.f.data[15:8] = cur[15:8] - 8'd1;
      end else if (cur[15]) begin
        new_e.route = 3'(PORT_YN); new_e.f.data[15:8] = cur[15:8] + 8'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_q    <= '0;
      fill     <= '0;
      pos      <= '0;
      len      <= '0;
      asm_head <= 1'b1;
      count    <= '0;
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      ack      <= 1'b0;
    end else begin
      ack <= pop && flit_valid;
      if (valid) begin
        if (pos == 9'd2) len <= data;
        if (close) begin
          asm_q    <= '0;
          fill     <= '0;
          asm_head <= last_byte;
          pos      <= last_byte ? '0 : pos + 9'd1;
          q[wr_ptr] <= new_e;
          wr_ptr   <= (wr_ptr == PW'(BUF_FLITS - 1)) ? '0 : wr_ptr + 1'b1;
        end else begin
          asm_q <= cur;
          fill  <= fill + 3'd1;
          pos   <= pos + 9'd1;
        end
      end
      if (pop && flit_valid)
        rd_ptr <= (rd_ptr == PW'(BUF_FLITS - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + QW'(close) - QW'(pop && flit_valid);
    end
  end

  assign flit_valid = (count != '0);
  assign flit       = q[rd_ptr].f;
  assign route      = q[rd_ptr].route;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    close |-> (count < QW'(BUF_FLITS)) || (pop && flit_valid));
endmodule
