// tb_acquire_bank: a bank of 2 correlators per stream (8-sample words) over
// a 203-sample code period (26 words, the last one padded with 5 zero
// slots). Random wiped samples are written, a random +/-1 replica is served
// through the code window port, and three runs are made: all 203 code
// shifts from 0, 20 shifts from 195 (wrapping past the end) and a single
// shift. Every power is compared with (sum_n I[n] r[(n - tau) mod NS])^2 +
// (sum_n Q[n] r[(n - tau) mod NS])^2 computed here. Powers must come one
// every 26 cycles, the first 26 + 4 cycles after the start cycle, and
// pow_last must mark the last shift of each run.
module tb_acquire_bank;
  localparam int NS = 203, N = 2, DW = 14, ACC_W = 28, L = 4 * N;
  localparam int WORDS = (NS + L - 1) / L;
  localparam int AW = $clog2(NS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, start = 0, busy, pow_valid, pow_last;
  logic [AW-1:0] wr_addr = '0, tau_first = '0, code_start, pow_tau;
  logic [AW:0] tau_count = '0;
  logic signed [DW-1:0] wr_i = '0, wr_q = '0;
  logic [L-1:0] code_win;
  logic [2*ACC_W:0] pow;

  acquire_bank #(.NS(NS), .N_CORR(N), .DW(DW), .ACC_W(ACC_W)) dut (.*);

  bit rep [NS];
  int si [NS], sq [NS];
  always_comb
    for (int k = 0; k < L; k++) code_win[k] = rep[(int'(code_start) + k) % NS];

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint ref_pow(input int tau);
    longint ai, aq;
    ai = 0; aq = 0;
    for (int n = 0; n < NS; n++) begin
      ai += rep[(n - tau + NS) % NS] ? -si[n] : si[n];
      aq += rep[(n - tau + NS) % NS] ? -sq[n] : sq[n];
    end
    return ai * ai + aq * aq;
  endfunction

  task automatic run(input int first, input int count);
    int got, cyc, last_cyc, tau;
    @(negedge clk);
    tau_first = AW'(first); tau_count = (AW+1)'(count); start = 1;
    @(negedge clk); start = 0;
    cyc = 1; got = 0; last_cyc = 0;
    while (got < count && cyc < count * WORDS + 100) begin
      if (pow_valid) begin
        tau = (first + got) % NS;
        chk(longint'(pow) == ref_pow(tau) && int'(pow_tau) == tau,
            $sformatf("tau %0d pow %0d expected %0d", pow_tau, pow, ref_pow(tau)));
        if (got == 0) chk(cyc == WORDS + 4, $sformatf("first power after %0d cycles", cyc));
        else          chk(cyc - last_cyc == WORDS, $sformatf("spacing %0d", cyc - last_cyc));
        chk(pow_last == (got == count - 1), "pow_last");
        last_cyc = cyc;
        got++;
      end
      @(negedge clk); cyc++;
    end
    chk(got == count, $sformatf("%0d powers for %0d shifts", got, count));
    chk(!busy, "idle after run");
  endtask

  initial begin
    for (int n = 0; n < NS; n++) begin
      rep[n] = 1'($urandom);
      si[n] = $urandom_range(16000) - 8000;
      sq[n] = $urandom_range(16000) - 8000;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(n); wr_i = DW'(si[n]); wr_q = DW'(sq[n]);
    end
    @(negedge clk) wr_en = 0;
    run(0, NS);
    run(195, 20);
    run(50, 1);
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
