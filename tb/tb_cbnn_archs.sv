// tb_cbnn_archs: end-to-end testbench of the three Hamming-initialised
// architectures side by side, at the 5 x 5 size (25 clusters of 8 neurons):
//   V1  Boolean equation with by-pass, no activation module
//   V2  SoM + G-WtA (k = 1)
//   V3  SoM + k-G-WtA (k = 4, 3, 2, 1)
// All three receive the same commands. The 64 oriented-edge patterns are
// stored, then clean, erased (edge pixels removed) and intruded (background
// pixels set to a random intensity) versions are decoded. Each result is
// compared with the behavioural reference and each latency with the count
// predicted from a_max. Mechanisms counted: by-pass of empty clusters (V1),
// erased neurons recovered (V1), G-WtA and k-G-WtA ties, decrease of k.
module tb_cbnn_archs;
  import cbnn_pkg::*;
  import cbnn_ref_pkg::*;

  localparam int C = 25, L = 8, NS = 5, NOR = 8, ITER = 4;
  localparam int VW = $clog2(L + 1);
  localparam int SW = score_width(ARCH_V2, C, L);

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  cmd_e cmd = CMD_NOP;
  logic [C-1:0][VW-1:0] patch = '0;
  logic [2:0] ready, dn;
  logic [2:0][C-1:0][L-1:0] st;

  cbnn_am #(.C(C), .L(L), .ARCH(ARCH_V1)) u_v1 (
    .clk, .rst_n, .cmd_valid, .cmd, .patch, .cmd_ready(ready[0]), .done(dn[0]), .states(st[0]));
  cbnn_am #(.C(C), .L(L), .ARCH(ARCH_V2)) u_v2 (
    .clk, .rst_n, .cmd_valid, .cmd, .patch, .cmd_ready(ready[1]), .done(dn[1]), .states(st[1]));
  cbnn_am #(.C(C), .L(L), .ARCH(ARCH_V3)) u_v3 (
    .clk, .rst_n, .cmd_valid, .cmd, .patch, .cmd_ready(ready[2]), .done(dn[2]), .states(st[2]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_recover = 0, n_tie = 0, n_kdec = 0, n_intr = 0;
  int n_orig [3] = '{0, 0, 0};
  longint cyc = 0;
  longint t_done [3];
  // cyc counts rising edges; t_done is the edge that ends an instance's done cycle
  always @(posedge clk) cyc++;
  always @(negedge clk)
    for (int a = 0; a < 3; a++) if (dn[a]) t_done[a] = cyc + 1;

  cbnn_model #(C, L) model = new;
  int pats [NOR*L][C];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic run_cmd(cmd_e c, int p [C], output longint t0);
    @(negedge clk);
    while (ready != 3'b111) @(negedge clk);
    cmd_valid = 1; cmd = c;
    for (int j = 0; j < C; j++) patch[j] = VW'(p[j]);
    @(negedge clk);
    t0 = cyc;
    cmd_valid = 0; cmd = CMD_NOP;
    while (ready != 3'b111) @(negedge clk);
  endtask

  task automatic decode_and_check(int p [C], int orig, string what);
    bit r [C*L];
    longint t0;
    run_cmd(CMD_DECODE, p, t0);
    for (int a = 0; a < 3; a++) begin
      int arch, k0, ks, exp_lat, k;
      bit same, is_orig;
      arch = a + 1;
      k0 = (a == 2) ? ITER : 1;
      ks = (a == 2) ? 1 : 0;
      model.decode(p, arch, 0, ITER, k0, ks, r);
      same = 1;
      is_orig = 1;
      for (int j = 0; j < C; j++)
        for (int i = 0; i < L; i++) begin
          if (st[a][j][i] != r[j*L+i]) same = 0;
          if (st[a][j][i] != (pats[orig][j] == i + 1)) is_orig = 0;
        end
      n_orig[a] += is_orig;
      check(same, $sformatf("V%0d %s: states differ from the reference", arch, what));
      exp_lat = 1;
      k = k0;
      foreach (model.amax[it]) begin
        exp_lat += ((model.amax[it] > 1) ? model.amax[it] : 1) + ((a == 0) ? 4 : SW + 4);
        if (a > 0 && model.nwin[it] > k) n_tie++;
        k = (k > ks) ? k - ks : 1;
      end
      if (a == 2) n_kdec++;
      check(t_done[a] - t0 == exp_lat,
            $sformatf("V%0d %s: latency %0d, expected %0d", arch, what, t_done[a] - t0, exp_lat));
    end
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
    longint t0;
    foreach (nop[j]) nop[j] = 0;
    for (int o = 0; o < NOR; o++)
      for (int v = 1; v <= L; v++) begin
        int tmp [];
        edge_pattern(NS, NOR, o, v, tmp);
        for (int j = 0; j < C; j++) pats[o*L + v - 1][j] = tmp[j];
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_cmd(CMD_CLEAR, nop, t0);
    model.clear();
    for (int p = 0; p < NOR*L; p++) begin
      run_cmd(CMD_STORE, pats[p], t0);
      model.store(pats[p]);
    end
    for (int p = 0; p < NOR*L; p += 5) decode_and_check(pats[p], p, $sformatf("clean %0d", p));
    // erasure: remove one or two edge pixels
    for (int t = 0; t < 30; t++) begin
      int p, q [C], ne;
      p = $urandom_range(NOR*L - 1, 0);
      q = pats[p];
      ne = 0;
      for (int e = 0; e < 2; e++) begin
        int j;
        j = $urandom_range(C - 1, 0);
        if (q[j] != 0) begin q[j] = 0; ne++; end
      end
      n_bypass += (ne > 0);
      decode_and_check(q, p, $sformatf("erasure %0d", t));
      if (ne > 0) begin
        bit rec;
        rec = 1;
        for (int j = 0; j < C; j++)
          if (q[j] == 0 && pats[p][j] != 0 && !st[0][j][pats[p][j] - 1]) rec = 0;
        n_recover += rec;
      end
    end
    // intrusion: eps background pixels set to a random intensity
    for (int eps = 1; eps <= 3; eps++)
      for (int t = 0; t < 15; t++) begin
        int p, q [C];
        p = $urandom_range(NOR*L - 1, 0);
        q = pats[p];
        for (int e = 0; e < eps; e++) begin
          int j;
          j = $urandom_range(C - 1, 0);
          if (pats[p][j] == 0) begin q[j] = $urandom_range(L, 1); n_intr++; end
        end
        decode_and_check(q, p, $sformatf("intrusion eps=%0d %0d", eps, t));
      end
    $display("original pattern returned: V1 %0d, V2 %0d, V3 %0d (of %0d decodes)",
             n_orig[0], n_orig[1], n_orig[2], 13 + 30 + 45);
    $display("mechanisms: by-pass of erased clusters %0d, erased neurons recovered by V1 %0d, intrusions %0d, k-G-WtA ties %0d, k decreases %0d",
             n_bypass, n_recover, n_intr, n_tie, n_kdec);
    check(n_bypass > 0 && n_recover > 0 && n_intr > 0 && n_tie > 0 && n_kdec > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
