// tb_scoring_isom: self-checking testbench of the Integer-Sum-of-Max scoring
// module (5 clusters of 8 neurons). Random contributions carry random
// potentials; every score is checked against e_i p_i + sum over distant
// clusters of the largest potential received on a set connection bit.
module tb_scoring_isom;
  localparam int C = 5, L = 8, B = $clog2(L * L + 1), SW = $clog2(C * L * L + 1);
  logic clk = 0, rst_n = 0, clear = 0, compute = 0;
  logic [C-2:0] cv = '0;
  logic [C-2:0][L-1:0] contrib = '0;
  logic [C-2:0][B-1:0] cpot = '0;
  logic [L-1:0] state = '0;
  logic [L-1:0][B-1:0] pot = '0;
  logic [L-1:0][SW-1:0] score;
  int checks = 0, failures = 0;

  scoring_isom #(.C(C), .L(L)) dut (.*);

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
    for (int t = 0; t < 200; t++) begin
      int mx [C-1][L];
      int cycles;
      foreach (mx[a, b]) mx[a][b] = 0;
      @(negedge clk);
      clear = 1; state = L'($urandom);
      for (int i = 0; i < L; i++) pot[i] = B'($urandom_range(L * L, 0));
      @(negedge clk);
      clear = 0;
      cycles = $urandom_range(5, 1);
      for (int c = 0; c < cycles; c++) begin
        for (int r = 0; r < C - 1; r++) begin
          cv[r] = $urandom_range(1, 0);
          contrib[r] = L'($urandom);
          cpot[r] = B'($urandom_range(L * L, 0));
          if (cv[r])
            for (int i = 0; i < L; i++)
              if (contrib[r][i] && int'(cpot[r]) > mx[r][i]) mx[r][i] = int'(cpot[r]);
        end
        @(negedge clk);
      end
      cv = '0; cpot = '1; contrib = '1;
      compute = 1;
      @(negedge clk);
      compute = 0;
      for (int i = 0; i < L; i++) begin
        int e;
        e = state[i] ? int'(pot[i]) : 0;
        for (int r = 0; r < C - 1; r++) e += mx[r][i];
        checks++;
        if (int'(score[i]) != e) begin
          failures++;
          $display("FAIL: trial %0d neuron %0d score %0d expected %0d", t, i, score[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
