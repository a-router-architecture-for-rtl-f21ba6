// tb_tc_input: streams 20-byte time-constrained packets into the input
// buffer, sometimes back to back and with the memory grant delayed by up to
// nine cycles, and checks that each packet comes out as two 10-byte chunks,
// the first marked as the header chunk, with the bytes in order.
module tb_tc_input;
  import rt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid = 0;
  logic [7:0] data = 0;
  logic req, first, gnt = 0;
  chunk_t chunk;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];
  int nchunks = 0;

  tc_input dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // grant the pending chunk after a random wait of 0..9 cycles
  initial begin
    forever begin
      @(negedge clk);
      if (req) begin
        repeat ($urandom % 10) @(negedge clk);
        check(first == (nchunks % 2 == 0), $sformatf("first flag on chunk %0d", nchunks));
        for (int b = 0; b < CHUNK_BYTES; b++)
          check(chunk[8*b +: 8] == sent.pop_front(), $sformatf("chunk %0d byte %0d", nchunks, b));
        nchunks++;
        gnt = 1; @(negedge clk); gnt = 0;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < 30; p++) begin
      for (int b = 0; b < TC_BYTES; b++) begin
        @(negedge clk);
        valid = 1; data = 8'($urandom);
        sent.push_back(data);
      end
      @(negedge clk); valid = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (30) @(negedge clk);
    check(nchunks == 60, $sformatf("chunks delivered %0d", nchunks));
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
