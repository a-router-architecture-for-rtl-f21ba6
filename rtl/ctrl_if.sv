// ctrl_if: the router's control interface.
//
// The local processor configures the router one byte at a time, to keep the
// pin count low. A connection-parameters command is four byte operations:
// the incoming connection id, the outgoing connection id, the local delay
// bound d and the output-port bit mask; the mask byte completes the command
// and writes the whole entry into the connection table in the following cycle
// (ct_we pulses for one cycle). A horizon command is two byte operations: a
// bit mask of output ports and the horizon value h, which is then written into
// the horizon register of every selected port.
//
// Which field a byte carries is given by ctrl_sel (this encoding is this
// design's choice; the document fixes only the fields and the byte-wide
// operations):
//   0 incoming id   1 outgoing id   2 delay d   3 port mask (commit)
//   4 horizon port mask             5 horizon value h (commit)
// Horizon registers reset to 0; bytes with other ctrl_sel values are ignored.
module ctrl_if
  import rt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ctrl_valid,
  input  logic [2:0]  ctrl_sel,
  input  logic [7:0]  ctrl_data,
  output logic        ct_we,
  output logic [7:0]  ct_id,
  output conn_entry_t ct_entry,
  output time_t       horizon [NPORTS]
);
  typedef enum logic [2:0] {
    SEL_IN_ID = 3'd0, SEL_OUT_ID = 3'd1, SEL_D = 3'd2, SEL_MASK = 3'd3,
    SEL_H_MASK = 3'd4, SEL_H_VAL = 3'd5
  } sel_e;

  logic [7:0] in_id_q, out_id_q;
  time_t      d_q;
  pmask_t     hmask_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_id_q  <= '0;
      out_id_q <= '0;
      d_q      <= '0;
      hmask_q  <= '0;
      ct_we    <= 1'b0;
      ct_id    <= '0;
      ct_entry <= '0;
      for (int p = 0; p < NPORTS; p++) horizon[p] <= '0;
    end else begin
      ct_we <= 1'b0;
      if (ctrl_valid) begin
        unique case (sel_e'(ctrl_sel))
          SEL_IN_ID:  in_id_q  <= ctrl_data;
          SEL_OUT_ID: out_id_q <= ctrl_data;
          SEL_D:      d_q      <= time_t'(ctrl_data);
          SEL_MASK: begin
            ct_we    <= 1'b1;
            ct_id    <= in_id_q;
            ct_entry <= '{out_id: out_id_q, d: d_q, mask: pmask_t'(ctrl_data)};
          end
          SEL_H_MASK: hmask_q <= pmask_t'(ctrl_data);
          SEL_H_VAL:
            for (int p = 0; p < NPORTS; p++)
              if (hmask_q[p]) horizon[p] <= time_t'(ctrl_data);
          default: ;
        endcase
      end
    end
  end
endmodule
