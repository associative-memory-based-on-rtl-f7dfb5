// tb_scoring_som: self-checking testbench of the Sum-of-Max scoring module
// (5 clusters of 8 neurons). Sends random contributions for a random number
// of cycles per distant cluster and checks every score against
// e_i + sum over distant clusters of the OR of the contributions received.
module tb_scoring_som;
  localparam int C = 5, L = 8, SW = $clog2(C + 1);
  logic clk = 0, rst_n = 0, clear = 0, compute = 0;
  logic [C-2:0] cv = '0;
  logic [C-2:0][L-1:0] contrib = '0;
  logic [L-1:0] state = '0;
  logic [L-1:0][SW-1:0] score;
  int checks = 0, failures = 0;

  scoring_som #(.C(C), .L(L)) dut (.*);

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
      logic [C-2:0][L-1:0] orv;
      int cycles;
      orv = '0;
      @(negedge clk);
      clear = 1; state = L'($urandom);
      @(negedge clk);
      clear = 0;
      cycles = $urandom_range(4, 1);
      for (int c = 0; c < cycles; c++) begin
        for (int r = 0; r < C - 1; r++) begin
          cv[r] = $urandom_range(1, 0);
          contrib[r] = L'($urandom);
          if (cv[r]) orv[r] |= contrib[r];
        end
        @(negedge clk);
      end
      cv = '0; contrib = L'($urandom);
      compute = 1;
      @(negedge clk);
      compute = 0;
      for (int i = 0; i < L; i++) begin
        int e;
        e = state[i];
        for (int r = 0; r < C - 1; r++) e += orv[r][i];
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
