// tb_storing_module: self-checking testbench of the storing module of one
// cluster (5 clusters of 8 neurons). Clears the RAMs, stores random
// patterns with the two-step read / write sequence and keeps its own copy of
// the connections. Then reads every neuron's row as during decoding and
// checks the contributions to each distant cluster, the potential sent with
// them and the one-cycle read latency.
module tb_storing_module;
  localparam int C = 5, L = 8, B = 7, IW = $clog2(L);
  logic clk = 0, rst_n = 0;
  logic clr = 0, rd = 0, wr = 0;
  logic [IW-1:0] clr_addr = '0, idx = '0;
  logic [C-2:0] peer_valid = '0;
  logic [C-2:0][IW-1:0] peer_idx = '0;
  logic [L-1:0][B-1:0] pot = '0;
  logic contrib_valid;
  logic [C-2:0][L-1:0] contrib;
  logic [B-1:0] contrib_pot;
  bit ref_w [L][C-1][L];
  int checks = 0, failures = 0;

  storing_module #(.C(C), .L(L), .B(B)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int i = 0; i < L; i++) begin
      @(negedge clk);
      rd = 1; idx = IW'(i);
      @(negedge clk);
      rd = 0;
      check(contrib_valid, "contribution valid one cycle after the read");
      check(contrib_pot == pot[i], $sformatf("potential of neuron %0d", i));
      for (int r = 0; r < C - 1; r++)
        for (int q = 0; q < L; q++)
          check(contrib[r][q] == ref_w[i][r][q],
                $sformatf("connection neuron %0d slot %0d neuron %0d", i, r, q));
      @(negedge clk);
      check(!contrib_valid, "contribution valid lasts one cycle");
    end
  endtask

  initial begin
    foreach (ref_w[a, b, c]) ref_w[a][b][c] = 0;
    for (int i = 0; i < L; i++) pot[i] = B'($urandom_range(64, 0));
    repeat (3) @(posedge clk);
    rst_n = 1;
    // clear
    for (int a = 0; a < L; a++) begin
      @(negedge clk); clr = 1; clr_addr = IW'(a);
    end
    @(negedge clk); clr = 0;
    read_all();
    // store patterns: read the row of the local active neuron, then write
    for (int p = 0; p < 12; p++) begin
      int li;
      li = $urandom_range(L - 1, 0);
      @(negedge clk);
      rd = 1; idx = IW'(li);
      for (int r = 0; r < C - 1; r++) begin
        peer_valid[r] = ($urandom_range(3, 0) != 0);
        peer_idx[r]   = IW'($urandom_range(L - 1, 0));
        if (peer_valid[r]) ref_w[li][r][peer_idx[r]] = 1;
      end
      @(negedge clk);
      rd = 0; wr = 1; idx = IW'($urandom_range(L - 1, 0));
      @(negedge clk);
      wr = 0; peer_valid = '0;
    end
    read_all();
    // clearing again empties the RAMs
    foreach (ref_w[a, b, c]) ref_w[a][b][c] = 0;
    for (int a = 0; a < L; a++) begin
      @(negedge clk); clr = 1; clr_addr = IW'(a);
    end
    @(negedge clk); clr = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
