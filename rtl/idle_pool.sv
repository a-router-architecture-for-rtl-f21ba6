// idle_pool: the idle-address pool of the shared packet memory.
//
// A stack held in a small memory plus a pointer. Entries below `sp` are in
// use; mem[sp] is the next free slot. Popping returns mem[sp] and increments
// the pointer; pushing decrements the pointer and writes the released address
// at the new top. After reset the memory is filled with 0..NPKT-1, one entry
// per cycle, and `ready` rises when that is done (NPKT cycles). Pop and push
// in the same cycle are not allowed (the shared memory bus serves one access
// per cycle). Admission control guarantees a free slot whenever a packet
// arrives; popping an empty pool, or pushing a full one, is flagged by an
// assertion. The stack organisation follows the document; the fill-after-reset
// sequencer is this design's choice.
module idle_pool #(
  parameter int NPKT = 256,
  localparam int AW = $clog2(NPKT)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          ready,
  output logic          empty,
  input  logic          pop,
  output logic [AW-1:0] pop_addr,
  input  logic          push,
  input  logic [AW-1:0] push_addr
);
  logic [AW-1:0] mem [NPKT];
  logic [AW:0]   sp;       // number of addresses in use
  logic [AW:0]   init_cnt;

  assign ready    = init_cnt[AW];
  assign empty    = sp[AW];
  assign pop_addr = mem[sp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (!ready)     mem[init_cnt[AW-1:0]] <= init_cnt[AW-1:0];
    else if (push)  mem[sp[AW-1:0] - 1'b1] <= push_addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp       <= '0;
      init_cnt <= '0;
    end else if (!ready) begin
      init_cnt <= init_cnt + 1'b1;
    end else if (pop) begin
      sp <= sp + 1'b1;
    end else if (push) begin
      sp <= sp - 1'b1;
    end
  end

  a_no_pop_push: assert property (@(posedge clk) disable iff (!rst_n) !(pop && push));
  a_pop_ok:      assert property (@(posedge clk) disable iff (!rst_n) pop  |-> ready && !empty);
  a_push_ok:     assert property (@(posedge clk) disable iff (!rst_n) push |-> ready && sp != '0);
endmodule
