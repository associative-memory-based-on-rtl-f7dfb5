// tb_cluster_init: self-checking testbench of the cluster initialisation
// (8 neurons). For every input value 0..15, every s 0..8 and both modes it
// checks the action potentials p_i = 64 - (v - (i+1))^2 (v clipped to 8) and
// the active neurons: the neuron of the value (Hamming) or the s values
// nearest to the input (Euclidean, lower value first on equal distance).
module tb_cluster_init;
  localparam int L = 8, VW = $clog2(L + 1), B = $clog2(L * L + 1);
  logic euclid;
  logic [VW-1:0] vin, s;
  logic [L-1:0] state;
  logic [L-1:0][B-1:0] pot;
  int checks = 0, failures = 0;

  cluster_init #(.L(L)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int v = 0; v < (1 << VW); v++)
        for (int ss = 0; ss <= L; ss++) begin
          int vc;
          logic [L-1:0] exp_state;
          euclid = m[0]; vin = VW'(v); s = VW'(ss);
          #1;
          vc = (v > L) ? L : v;
          exp_state = '0;
          if (vc != 0) begin
            if (m == 0) exp_state[vc - 1] = 1'b1;
            else begin
              // walk outward from the input value: distance 0, then 1 below, 1 above, ...
              int taken;
              taken = 0;
              for (int d = 0; d < L && taken < ss; d++) begin
                if (vc - d >= 1 && taken < ss) begin exp_state[vc - d - 1] = 1'b1; taken++; end
                if (d > 0 && vc + d <= L && taken < ss) begin exp_state[vc + d - 1] = 1'b1; taken++; end
              end
            end
          end
          checks++;
          if (state != exp_state) begin
            failures++;
            $display("FAIL: euclid=%0d vin=%0d s=%0d state %b expected %b", m, v, ss, state, exp_state);
          end
          for (int i = 0; i < L; i++) begin
            int ep;
            ep = (vc == 0) ? 0 : L * L - (vc - i - 1) * (vc - i - 1);
            checks++;
            if (int'(pot[i]) != ep) begin
              failures++;
              $display("FAIL: vin=%0d pot[%0d]=%0d expected %0d", v, i, pot[i], ep);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
