// tb_cbnn_am: end-to-end testbench of the associative memory at its default
// size and architecture (25 clusters of 8 neurons, 5 x 5 patches, V4:
// Euclidean initialisation with s = 8, I-SoM, k-G-WtA with k = 20, 15, 10, 5).
//
// It clears the memory, stores the 64 oriented-edge patterns of the 5 x 5
// set (8 orientations x 8 intensities) and decodes noisy versions of them:
// clean, additive Gaussian noise, and additive plus intrusion noise. Every
// decoded state vector is compared with the behavioural reference model
// (cbnn_ref_pkg), and every decoding latency with the cycle count predicted
// from the per-iteration a_max of the reference. It reports how often the
// original pattern was returned, and counts the mechanisms exercised: memory
// clear, store, several active neurons per cluster (serial pass over more
// than one cycle), k-G-WtA ties (more winners than k) and the decrease of k.
module tb_cbnn_am;
  import cbnn_pkg::*;
  import cbnn_ref_pkg::*;

  localparam int C = 25, L = 8, NS = 5, NOR = 8;
  localparam int VW = $clog2(L + 1);
  localparam int SW = score_width(ARCH_V4, C, L);
  localparam int K0 = 20, KS = 5, S = 8, ITER = 4;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  cmd_e cmd = CMD_NOP;
  logic [C-1:0][VW-1:0] patch = '0;
  logic cmd_ready, done;
  logic [C-1:0][L-1:0] states;

  cbnn_am dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clear = 0, n_store = 0, n_decode = 0, n_multi = 0, n_tie = 0, n_kdec = 0;
  int n_orig = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  cbnn_model #(C, L) model = new;
  int pats [NOR*L][C];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // issue a command, return the number of cycles until done (decode) or ready
  task automatic run_cmd(cmd_e c, int p [C], output longint lat);
    longint t0;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd = c;
    for (int j = 0; j < C; j++) patch[j] = VW'(p[j]);
    @(negedge clk);
    t0 = cyc;
    cmd_valid = 0; cmd = CMD_NOP;
    // latency in cycles: from the accepting cycle up to the done cycle
    // (decode) or the return to idle (other commands)
    if (c == CMD_DECODE) while (!done) @(negedge clk);
    else while (!cmd_ready) @(negedge clk);
    lat = cyc - t0 + 1;
  endtask

  task automatic decode_and_check(int p [C], int orig, string what);
    bit st [C*L];
    longint lat;
    int exp_lat, k;
    bit same, is_orig;
    model.decode(p, 4, S, ITER, K0, KS, st);
    run_cmd(CMD_DECODE, p, lat);
    n_decode++;
    same = 1;
    for (int j = 0; j < C; j++)
      for (int i = 0; i < L; i++) if (states[j][i] != st[j*L+i]) same = 0;
    check(same, $sformatf("%s: decoded states differ from the reference", what));
    exp_lat = 1;
    k = K0;
    foreach (model.amax[it]) begin
      exp_lat += ((model.amax[it] > 1) ? model.amax[it] : 1) + SW + 4;
      if (model.amax[it] > 1) n_multi++;
      if (model.nwin[it] > k) n_tie++;
      k = (k > KS) ? k - KS : 1;
    end
    n_kdec++;
    check(lat == exp_lat, $sformatf("%s: latency %0d, expected %0d", what, lat, exp_lat));
    is_orig = 1;
    for (int j = 0; j < C; j++)
      for (int i = 0; i < L; i++)
        if (states[j][i] != (pats[orig][j] == i + 1)) is_orig = 0;
    n_orig += is_orig;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nop [C];
    longint lat;
    foreach (nop[j]) nop[j] = 0;
    // pattern set: 8 orientations x 8 intensities of 5 x 5 edges
    for (int o = 0; o < NOR; o++)
      for (int v = 1; v <= L; v++) begin
        int tmp [];
        edge_pattern(NS, NOR, o, v, tmp);
        for (int j = 0; j < C; j++) pats[o*L + v - 1][j] = tmp[j];
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_cmd(CMD_CLEAR, nop, lat);
    n_clear++;
    check(lat == L + 1, $sformatf("clear took %0d cycles", lat));
    model.clear();
    for (int p = 0; p < NOR*L; p++) begin
      run_cmd(CMD_STORE, pats[p], lat);
      model.store(pats[p]);
      n_store++;
      check(lat == 4, $sformatf("store took %0d cycles", lat));
    end
    // clean patterns
    for (int p = 0; p < NOR*L; p += 3) decode_and_check(pats[p], p, $sformatf("clean %0d", p));
    $display("clean: original returned %0d times", n_orig);
    // additive noise, then additive + intrusion noise
    for (int mode = 0; mode < 3; mode++) begin
      int ok0;
      ok0 = n_orig;
      for (int t = 0; t < 30; t++) begin
        int p, q [C];
        real sigma;
        p = $urandom_range(NOR*L - 1, 0);
        sigma = (mode == 0) ? $sqrt(0.5) : $sqrt(1.5);
        for (int j = 0; j < C; j++) begin
          q[j] = pats[p][j];
          if (q[j] != 0) begin
            int nv;
            nv = $rtoi(q[j] + gauss(sigma) + 100.5) - 100;
            q[j] = (nv < 1) ? 1 : (nv > L) ? L : nv;
          end
        end
        if (mode == 2)
          for (int e = 0; e < 2; e++) begin
            int j;
            j = $urandom_range(C - 1, 0);
            if (pats[p][j] == 0) q[j] = $urandom_range(L, 1);
          end
        decode_and_check(q, p, $sformatf("noise mode %0d trial %0d", mode, t));
      end
      $display("noise mode %0d (%s): original returned %0d of 30", mode,
               mode == 0 ? "additive, var 0.5" : mode == 1 ? "additive, var 1.5" :
               "additive var 1.5 + 2 intrusions", n_orig - ok0);
    end
    // clearing empties the memory: a decode then finds no connections
    run_cmd(CMD_CLEAR, nop, lat);
    model.clear();
    n_clear++;
    decode_and_check(pats[0], 0, "after clear");
    $display("mechanisms: clear %0d, store %0d, decode %0d, multi-neuron serial pass %0d, k-G-WtA ties %0d, k decreases %0d",
             n_clear, n_store, n_decode, n_multi, n_tie, n_kdec);
    check(n_clear > 0 && n_store > 0 && n_decode > 0 && n_multi > 0 && n_tie > 0 && n_kdec > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
