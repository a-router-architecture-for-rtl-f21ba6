// packet_memory: shared single-ported packet buffer for time-constrained
// traffic.
//
// NPKT packet slots of two 10-byte chunks each, one access per cycle. Word
// address = {slot, chunk}. A write stores wdata at the clock edge; a read
// presents the word on rdata in the following cycle (synchronous read, like
// the SRAM it stands for). The 10-byte word and the single port follow the
// document; the read timing is this design's choice.
module packet_memory #(
  parameter int NPKT        = 256,
  parameter int CHUNK_BYTES = 10,
  localparam int AW = $clog2(NPKT) + 1,
  localparam int DW = CHUNK_BYTES * 8
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2*NPKT];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
