// tb_packet_memory: random writes and reads of 10-byte chunks against a
// reference array, checking the one-cycle read latency.
module tb_packet_memory;
  logic clk = 0;
  logic en = 0, we = 0;
  logic [8:0] addr = 0;
  logic [79:0] wdata = 0, rdata;
  logic [79:0] model [512];
  bit valid [512];
  int checks = 0, failures = 0;

  packet_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      en = 1; addr = 9'($urandom);
      we = ($urandom % 2) == 0;
      wdata = {$urandom, $urandom, $urandom};
      if (we) begin
        model[addr] = wdata; valid[addr] = 1;
        @(negedge clk); en = 0;
      end else begin
        @(negedge clk); en = 0;
        if (valid[addr]) begin
          checks++;
          if (rdata != model[addr]) begin failures++; $display("FAIL: addr %0d", addr); end
        end
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
