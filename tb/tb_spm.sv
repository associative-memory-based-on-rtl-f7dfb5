// tb_spm: self-checking testbench of the Serial Pass Module. Loads random
// state vectors and checks that the active indexes come out one per cycle,
// in increasing order, that `last` marks the final one and that a vector
// with a active bits takes exactly a cycles.
module tb_spm;
  localparam int L = 8;
  localparam int IW = $clog2(L);
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [L-1:0] states_in = '0;
  logic valid, last;
  logic [IW-1:0] idx;
  int checks = 0, failures = 0;

  spm #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

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
    for (int t = 0; t < 300; t++) begin
      logic [L-1:0] v;
      int expect_list [$];
      int cyc;
      v = (t < 256) ? L'(t) : L'($urandom);
      for (int i = 0; i < L; i++) if (v[i]) expect_list.push_back(i);
      @(negedge clk);
      load = 1; states_in = v; step = 0;
      @(negedge clk);
      load = 0; step = 1;
      cyc = 0;
      while (valid) begin
        check(expect_list.size() > 0 && int'(idx) == expect_list[0],
              $sformatf("vector %b: idx %0d", v, idx));
        check(last == (expect_list.size() == 1), $sformatf("vector %b: last flag", v));
        if (expect_list.size() > 0) void'(expect_list.pop_front());
        cyc++;
        @(negedge clk);
      end
      step = 0;
      check(cyc == $countones(v), $sformatf("vector %b: %0d cycles", v, cyc));
      check(expect_list.size() == 0, "all indexes sent");
    end
    // step without load keeps an empty module empty; load wins over step
    @(negedge clk); load = 1; step = 1; states_in = 8'b1000_0001;
    @(negedge clk); load = 0; step = 0;
    check(valid && idx == 0, "load has priority over step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
