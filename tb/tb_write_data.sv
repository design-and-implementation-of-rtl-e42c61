// tb_write_data: captures a 300-sample record delivered with random gaps,
// checks that `ready` rises exactly after the last sample and that samples
// arriving afterwards are ignored, then reads every address back (data one
// cycle after the address) and compares with the record. A second capture
// overwrites the record.
module tb_write_data;
  localparam int NS = 300, SW = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic capture = 0, in_valid = 0, busy, ready;
  logic signed [SW-1:0] in_i = '0, in_q = '0, rd_i, rd_q;
  logic [$clog2(NS)-1:0] rd_addr = '0;

  write_data #(.NS(NS), .SAMPLE_W(SW)) dut (.*);

  int checks = 0, failures = 0;
  int ri [NS], rq [NS];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic fill(input int seed);
    @(negedge clk) capture = 1;
    @(negedge clk) capture = 0;
    chk(busy && !ready, "busy after capture");
    for (int n = 0; n < NS; n++) begin
      while ($urandom_range(2) == 0) begin in_valid = 0; @(negedge clk); end
      ri[n] = (n * 7 + seed) % 4096 - 2048;
      rq[n] = (n * 13 + 3 * seed) % 4096 - 2048;
      in_valid = 1; in_i = SW'(ri[n]); in_q = SW'(rq[n]);
      @(negedge clk);
      if (n < NS - 1) chk(!ready, "not ready early");
    end
    chk(ready && !busy, "ready after last sample");
    in_i = 12'sd5; in_q = 12'sd5;   // must be ignored
    @(negedge clk);
    in_valid = 0;
    for (int n = 0; n < NS; n++) begin
      rd_addr = $clog2(NS)'(n);
      @(negedge clk);
      chk(int'(rd_i) == ri[n] && int'(rd_q) == rq[n], $sformatf("read %0d", n));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    chk(!ready && !busy, "idle after reset");
    fill(11);
    fill(777);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
