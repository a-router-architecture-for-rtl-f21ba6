// conn_table: connection (routing) table for time-constrained traffic.
//
// NCONN entries, indexed by the connection id carried in the first byte of an
// arriving time-constrained packet. Each entry holds the connection id to use
// at the next router, the local delay bound d and the bit mask of output ports
// that the packet is queued on (more than one bit set = multicast). The read
// is combinational so the memory controller can rewrite the header in the
// cycle it stores the first chunk; writes come from the control interface and
// take effect at the clock edge. The port masks reset to zero so that an
// unconfigured connection id forwards nothing (this reset is this design's
// choice); the other fields are plain storage.
module conn_table
  import rt_pkg::*;
#(
  parameter int NCONN = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [7:0]  wr_id,
  input  conn_entry_t wr_entry,
  input  logic [7:0]  rd_id,
  output conn_entry_t rd_entry
);
  localparam int IW = $clog2(NCONN);

  logic [7:0] out_id_mem [NCONN];
  time_t      d_mem      [NCONN];
  pmask_t     mask_mem   [NCONN];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      out_id_mem[wr_id[IW-1:0]] <= wr_entry.out_id;
      d_mem[wr_id[IW-1:0]]      <= wr_entry.d;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCONN; i++) mask_mem[i] <= '0;
    end else if (wr_en) begin
      mask_mem[wr_id[IW-1:0]] <= wr_entry.mask;
    end
  end

  always_comb begin
    rd_entry.out_id = out_id_mem[rd_id[IW-1:0]];
    rd_entry.d      = d_mem[rd_id[IW-1:0]];
    rd_entry.mask   = mask_mem[rd_id[IW-1:0]];
  end
endmodule
