// rt_pkg: constants and types shared by the real-time router.
//
// The router has five ports: port 0 is the local processor (injection on the
// input side, reception on the output side) and ports 1..4 are the +x, -x, +y
// and -y mesh links. A link carries a data byte, a strobe and a virtual channel
// bit (1 = time-constrained, 0 = best-effort), with a flit acknowledgement in
// the reverse direction. Time-constrained packets are 20 bytes and move through
// the shared packet memory in 10-byte chunks; best-effort packets move as
// five-byte flits. The clock used for logical arrival times and deadlines is
// TBITS wide and compared with modulo arithmetic. The sizes follow the
// document; the port numbering and the virtual channel encoding are this
// design's own choices.
package rt_pkg;

  localparam int NPORTS      = 5;   // local + four mesh directions
  localparam int TBITS       = 8;   // real-time clock width b
  localparam int DEF_NPKT    = 256; // time-constrained packet slots
  localparam int DEF_NCONN   = 256; // connection table entries
  localparam int TC_BYTES    = 20;  // fixed time-constrained packet size
  localparam int CHUNK_BYTES = 10;  // packet memory word
  localparam int FLIT_BYTES  = 5;   // best-effort flit / bus width

  localparam int PORT_LOCAL = 0;
  localparam int PORT_XP    = 1;
  localparam int PORT_XN    = 2;
  localparam int PORT_YP    = 3;
  localparam int PORT_YN    = 4;

  localparam logic VC_BE = 1'b0;
  localparam logic VC_TC = 1'b1;

  typedef logic [NPORTS-1:0]         pmask_t;
  typedef logic [TBITS-1:0]          time_t;
  typedef logic [CHUNK_BYTES*8-1:0]  chunk_t;

  // One connection-table entry (Table III of the design notes).
  typedef struct packed {
    logic [7:0] out_id;  // connection id at the next router
    time_t      d;       // local delay bound
    pmask_t     mask;    // outgoing ports (several = multicast)
  } conn_entry_t;

  // Sorting key of one packet for one port. Smaller wins.
  // inelig: the packet is not queued for this port.
  // early : 0 = on-time (val = l+d-t), 1 = early (val = l-t).
  typedef struct packed {
    logic  inelig;
    logic  early;
    time_t val;
  } skey_t;

  // A best-effort flit as it moves from an input buffer to an output buffer.
  typedef struct packed {
    logic [FLIT_BYTES*8-1:0] data;   // byte 0 in bits [7:0]
    logic [2:0]              nbytes; // 1..5 valid bytes
    logic                    head;
    logic                    tail;
  } flit_t;

  // Comparator node: the left operand wins ties.
  function automatic logic key_le(skey_t a, skey_t b);
    return {a.inelig, a.early, a.val} <= {b.inelig, b.early, b.val};
  endfunction

  // True when logical arrival time l has not yet been reached at time t,
  // i.e. (l - t) mod 2^TBITS lies in [1, 2^(TBITS-1)).
  function automatic logic is_early(time_t l, time_t t);
    time_t diff;
    diff = l - t;
    return (diff != '0) && !diff[TBITS-1];
  endfunction

endpackage
