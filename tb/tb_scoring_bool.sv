// tb_scoring_bool: self-checking testbench of the Boolean-equation module
// (5 clusters of 8 neurons). Random previous states, random by-pass flags
// and random contributions; each new state is checked against: (active, or
// own cluster empty) and, for every distant cluster that is not by-passed,
// at least one received contribution bit. Counts how often the by-pass and
// the empty-cluster case decided a neuron.
module tb_scoring_bool;
  localparam int C = 5, L = 8;
  logic clk = 0, rst_n = 0, clear = 0, compute = 0;
  logic [C-2:0] bypass = '0;
  logic [C-2:0] cv = '0;
  logic [C-2:0][L-1:0] contrib = '0;
  logic [L-1:0] state = '0;
  logic [L-1:0] next_state;
  int checks = 0, failures = 0, n_bypass = 0, n_empty = 0, n_on = 0;

  scoring_bool #(.C(C), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      logic [C-2:0][L-1:0] orv;
      int cycles;
      orv = '0;
      @(negedge clk);
      clear = 1;
      state = ($urandom_range(3, 0) == 0) ? '0 : L'($urandom);
      for (int r = 0; r < C - 1; r++) bypass[r] = ($urandom_range(3, 0) == 0);
      @(negedge clk);
      clear = 0;
      cycles = $urandom_range(3, 1);
      for (int c = 0; c < cycles; c++) begin
        for (int r = 0; r < C - 1; r++) begin
          cv[r] = !bypass[r];
          contrib[r] = L'($urandom) | L'($urandom);
          if (cv[r]) orv[r] |= contrib[r];
        end
        @(negedge clk);
      end
      cv = '0;
      compute = 1;
      @(negedge clk);
      compute = 0;
      for (int i = 0; i < L; i++) begin
        bit e;
        e = state[i] || (state == '0);
        for (int r = 0; r < C - 1; r++) e = e && (bypass[r] || orv[r][i]);
        checks++;
        if (next_state[i] != e) begin
          failures++;
          $display("FAIL: trial %0d neuron %0d got %0b expected %0b", t, i, next_state[i], e);
        end
        if (e) begin
          n_on++;
          if (state == '0) n_empty++;
          if (bypass != '0) n_bypass++;
        end
      end
    end
    $display("activated %0d, with by-pass %0d, in an empty cluster %0d", n_on, n_bypass, n_empty);
    checks++;
    if (n_bypass == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL: by-pass or empty-cluster case never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
