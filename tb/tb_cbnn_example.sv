// tb_cbnn_example: directed end-to-end test on a small network of 6
// clusters of 9 neurons holding three patterns of four neurons each
// (neuron i of cluster j written n(i,j)):
//   P0 = n(7,0) n(3,1) n(5,3) n(7,4)
//   P1 = n(3,1) n(6,2) n(1,4) n(5,5)
//   P2 = n(5,1) n(0,2) n(8,4) n(5,5)
// Cases, one iteration each, scores and states checked against values
// worked out by hand from the rules:
//   erasure: P2 without n(8,4). SoM scores: 3 for the four neurons of P2,
//     1 for n(3,1), n(1,4), n(6,2), 0 elsewhere; G-WtA (V2) and the Boolean
//     equation (V1, by-pass of the empty cluster 0 and 3) both return P2.
//   intrusion connected to the pattern: P0 plus n(6,2). SoM scores: 5 for
//     n(3,1), 4 for n(7,0), n(5,3), n(7,4), 2 for n(6,2), n(1,4), n(5,5);
//     G-WtA (V2) keeps only n(3,1), k-G-WtA with k = 3 (V3, highest scores
//     5, 4, 4) returns P0.
module tb_cbnn_example;
  import cbnn_pkg::*;

  localparam int C = 6, L = 9;
  localparam int VW = $clog2(L + 1);
  localparam int SW = score_width(ARCH_V2, C, L);

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  cmd_e cmd = CMD_NOP;
  logic [C-1:0][VW-1:0] patch = '0;
  logic [2:0] ready, dn;
  logic [2:0][C-1:0][L-1:0] st;
  logic [C-1:0][L-1:0][SW-1:0] sc2, sc3;

  cbnn_am #(.C(C), .L(L), .ARCH(ARCH_V1), .ITER(1)) u_v1 (
    .clk, .rst_n, .cmd_valid, .cmd, .patch, .cmd_ready(ready[0]), .done(dn[0]), .states(st[0]));
  cbnn_am #(.C(C), .L(L), .ARCH(ARCH_V2), .ITER(1)) u_v2 (
    .clk, .rst_n, .cmd_valid, .cmd, .patch, .cmd_ready(ready[1]), .done(dn[1]), .states(st[1]));
  cbnn_am #(.C(C), .L(L), .ARCH(ARCH_V3), .ITER(1), .K_INIT(3)) u_v3 (
    .clk, .rst_n, .cmd_valid, .cmd, .patch, .cmd_ready(ready[2]), .done(dn[2]), .states(st[2]));

  for (genvar j = 0; j < C; j++) begin : g_tap
    assign sc2[j] = u_v2.g_cl[j].g_som.u_score.score;
    assign sc3[j] = u_v3.g_cl[j].g_som.u_score.score;
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // patch from a list of (neuron, cluster) pairs: pixel value = neuron + 1
  task automatic run_cmd(cmd_e c, int n [$], int cl [$]);
    @(negedge clk);
    while (ready != 3'b111) @(negedge clk);
    patch = '0;
    foreach (n[q]) patch[cl[q]] = VW'(n[q] + 1);
    cmd_valid = 1; cmd = c;
    @(negedge clk);
    cmd_valid = 0; cmd = CMD_NOP;
    while (ready != 3'b111) @(negedge clk);
  endtask

  function automatic logic [C-1:0][L-1:0] neurons(int n [$], int cl [$]);
    logic [C-1:0][L-1:0] v;
    v = '0;
    foreach (n[q]) v[cl[q]][n[q]] = 1'b1;
    return v;
  endfunction

  task automatic check_scores(logic [C-1:0][L-1:0][SW-1:0] sc, int val [C][L], string what);
    for (int j = 0; j < C; j++)
      for (int i = 0; i < L; i++)
        check(int'(sc[j][i]) == val[j][i],
              $sformatf("%s: score of n(%0d,%0d) is %0d, expected %0d", what, i, j, sc[j][i], val[j][i]));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int val [C][L];
    repeat (3) @(posedge clk);
    rst_n = 1;
    begin
      int none [$];
      run_cmd(CMD_CLEAR, none, none);
    end
    run_cmd(CMD_STORE, {7, 3, 5, 7}, {0, 1, 3, 4});
    run_cmd(CMD_STORE, {3, 6, 1, 5}, {1, 2, 4, 5});
    run_cmd(CMD_STORE, {5, 0, 8, 5}, {1, 2, 4, 5});

    // erasure of n(8,4) in P2
    run_cmd(CMD_DECODE, {5, 0, 5}, {1, 2, 5});
    foreach (val[j, i]) val[j][i] = 0;
    val[1][5] = 3; val[2][0] = 3; val[5][5] = 3; val[4][8] = 3;
    val[1][3] = 1; val[4][1] = 1; val[2][6] = 1;
    check_scores(sc2, val, "erasure SoM");
    check(st[1] == neurons({5, 0, 8, 5}, {1, 2, 4, 5}), "erasure: G-WtA returns P2");
    check(st[0] == neurons({5, 0, 8, 5}, {1, 2, 4, 5}), "erasure: Boolean equation returns P2");

    // intrusion n(6,2) connected to n(3,1) of P0
    run_cmd(CMD_DECODE, {7, 3, 6, 5, 7}, {0, 1, 2, 3, 4});
    foreach (val[j, i]) val[j][i] = 0;
    val[1][3] = 5; val[0][7] = 4; val[3][5] = 4; val[4][7] = 4;
    val[2][6] = 2; val[4][1] = 2; val[5][5] = 2;
    check_scores(sc3, val, "intrusion SoM");
    check(st[1] == neurons({3}, {1}), "intrusion: G-WtA keeps only n(3,1)");
    check(st[2] == neurons({7, 3, 5, 7}, {0, 1, 3, 4}), "intrusion: 3-G-WtA returns P0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
