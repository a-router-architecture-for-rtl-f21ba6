// tb_ctrl_if: drives connection-parameter and horizon commands through the
// byte-wide control interface and checks the table write and the per-port
// horizon registers against a reference model.
module tb_ctrl_if;
  import rt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ctrl_valid = 0;
  logic [2:0] ctrl_sel = 0;
  logic [7:0] ctrl_data = 0;
  logic ct_we;
  logic [7:0] ct_id;
  conn_entry_t ct_entry;
  time_t horizon [NPORTS];
  time_t hmodel [NPORTS];
  int checks = 0, failures = 0;

  ctrl_if dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input logic [2:0] sel, input logic [7:0] d);
    @(negedge clk);
    ctrl_valid = 1; ctrl_sel = sel; ctrl_data = d;
    @(negedge clk);
    ctrl_valid = 0;
  endtask

  initial begin
    for (int p = 0; p < NPORTS; p++) hmodel[p] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 40; n++) begin
      logic [7:0] iid, oid, d, m;
      iid = 8'($urandom); oid = 8'($urandom); d = 8'($urandom % 128); m = 8'($urandom % 32);
      send(0, iid); send(1, oid); send(2, d);
      check(!ct_we, "no write before mask byte");
      @(negedge clk);
      ctrl_valid = 1; ctrl_sel = 3; ctrl_data = m;
      @(negedge clk);
      ctrl_valid = 0;
      check(ct_we, "write strobe after mask byte");
      check(ct_id == iid, "incoming id");
      check(ct_entry.out_id == oid && ct_entry.d == d && ct_entry.mask == m[4:0], "entry fields");
      @(negedge clk);
      check(!ct_we, "write strobe lasts one cycle");
      // horizon command
      begin
        logic [7:0] hm, hv;
        hm = 8'($urandom % 32); hv = 8'($urandom);
        send(4, hm); send(5, hv);
        for (int p = 0; p < NPORTS; p++) if (hm[p]) hmodel[p] = hv;
        @(negedge clk);
        for (int p = 0; p < NPORTS; p++)
          check(horizon[p] == hmodel[p], $sformatf("horizon port %0d = %0d exp %0d", p, horizon[p], hmodel[p]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
