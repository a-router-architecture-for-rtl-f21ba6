// tb_conn_table: writes random entries into the connection table and reads
// them back against a reference array; also checks that port masks are
// zero after reset.
module tb_conn_table;
  import rt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [7:0] wr_id = 0, rd_id = 0;
  conn_entry_t wr_entry = '0, rd_entry;
  conn_entry_t model [256];
  bit written [256];
  int checks = 0, failures = 0;

  conn_table dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int i = 0; i < 256; i += 17) begin
      rd_id = 8'(i); #1;
      check(rd_entry.mask == '0, "mask cleared at reset");
    end
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      wr_en = 1; wr_id = 8'($urandom);
      wr_entry = '{out_id: 8'($urandom), d: 8'($urandom), mask: 5'($urandom)};
      model[wr_id] = wr_entry; written[wr_id] = 1;
      rd_id = 8'($urandom);
      @(negedge clk);
      wr_en = 0;
      #1;
      if (written[rd_id]) check(rd_entry == model[rd_id], $sformatf("read id %0d", rd_id));
      rd_id = wr_id; #1;
      check(rd_entry == model[wr_id], $sformatf("read back id %0d", wr_id));
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
