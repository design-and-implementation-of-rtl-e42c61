// tb_prn_finder: generates the GPS C/A codes of PRN 1..32 and compares the
// first ten chips of each with the octal values published in the GPS
// signal definition, and all 1023 chips with an independent shift-register
// model. Three IRNSS-style codes (G2 start states) are compared with the
// model as well. `done` must rise in the 1024th cycle after the `start` cycle (1023
// generation cycles).
module tb_prn_finder;
  import acq_pkg::*;
  import gnss_code_model::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done;
  gnss_sys_e sys = SYS_GPS;
  logic [5:0] prn = 6'd1;
  logic [9:0] g2_init = '0;
  logic [CHIPS-1:0] chips;

  prn_finder dut (.*);

  // First 10 chips, octal, first chip as the most significant bit (logic 1
  // = chip value 1), PRN 1..32.
  localparam logic [9:0] FIRST10 [32] = '{
    10'o1440, 10'o1620, 10'o1710, 10'o1744, 10'o1133, 10'o1455, 10'o1131, 10'o1454,
    10'o1626, 10'o1504, 10'o1642, 10'o1750, 10'o1764, 10'o1772, 10'o1775, 10'o1776,
    10'o1156, 10'o1467, 10'o1633, 10'o1715, 10'o1746, 10'o1763, 10'o1063, 10'o1706,
    10'o1743, 10'o1761, 10'o1770, 10'o1774, 10'o1127, 10'o1453, 10'o1625, 10'o1712
  };

  int checks = 0, failures = 0;
  int code [1023];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input gnss_sys_e s, input int p, input logic [9:0] init);
    int cyc, bad;
    logic [9:0] f10;
    @(negedge clk); sys = s; prn = 6'(p); g2_init = init; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == 1024, $sformatf("sys %0d prn %0d: done after %0d cycles", s, p, cyc));
    gold(s == SYS_IRNSS, p, init, code);
    bad = 0;
    for (int n = 0; n < 1023; n++)
      if ((code[n] == -1) != chips[n]) bad++;
    chk(bad == 0, $sformatf("sys %0d prn %0d init %b: %0d chips differ from model", s, p, init, bad));
    if (s == SYS_GPS) begin
      for (int n = 0; n < 10; n++) f10[9-n] = chips[n];
      chk(f10 == FIRST10[p-1], $sformatf("prn %0d first chips %o expected %o", p, f10, FIRST10[p-1]));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int p = 1; p <= 32; p++) run(SYS_GPS, p, '0);
    run(SYS_IRNSS, 0, 10'b1110100111);
    run(SYS_IRNSS, 0, 10'b0000100101);
    run(SYS_IRNSS, 0, 10'b1000110100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
