// tb_kgwta: self-checking testbench of the k-G-WtA activation module
// (24 scores of 6 bits). For random scores (with many ties) and random k it
// checks the winners against a sort-based reference (threshold = k-th
// highest score, zero scores never win) and that `done` comes exactly SW+1
// cycles after `start`, i.e. one cycle per score bit plus the output cycle.
module tb_kgwta;
  localparam int N = 24, SW = 6, KW = $clog2(N + 1);
  logic clk = 0, rst_n = 0, start = 0;
  logic [KW-1:0] k = '0;
  logic [N-1:0][SW-1:0] score = '0;
  logic busy, done;
  logic [N-1:0] win;
  int checks = 0, failures = 0, n_ties = 0;

  kgwta #(.N(N), .SW(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int s [$];
      int thr, kk, cyc, nwin;
      int range_max;
      s = {};
      range_max = (t % 3 == 0) ? 7 : (1 << SW) - 1;
      kk = (t < 10) ? 1 : $urandom_range(N + 2, 1);
      if (t % 50 == 1) kk = N;
      for (int n = 0; n < N; n++) score[n] = SW'($urandom_range(range_max, 0));
      if (t % 97 == 5) score = '0;
      for (int n = 0; n < N; n++) s.push_back(int'(score[n]));
      s.rsort();
      thr = (kk <= N) ? s[kk-1] : 0;
      @(negedge clk);
      start = 1; k = KW'(kk);
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
        if (cyc > 100) break;
      end
      checks++;
      if (cyc != SW + 1) begin
        failures++;
        $display("FAIL: done after %0d cycles, expected %0d", cyc, SW + 1);
      end
      nwin = 0;
      for (int n = 0; n < N; n++) begin
        bit e;
        e = (int'(score[n]) >= thr) && (score[n] != 0);
        nwin += e;
        checks++;
        if (win[n] != e) begin
          failures++;
          $display("FAIL: trial %0d k=%0d score[%0d]=%0d win %0b expected %0b (thr %0d)",
                   t, kk, n, score[n], win[n], e, thr);
        end
      end
      if (nwin > kk) n_ties++;
    end
    $display("trials with more winners than k (ties): %0d", n_ties);
    checks++;
    if (n_ties == 0) begin
      failures++;
      $display("FAIL: tie case never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
