// scoring_isom: Integer-Sum-of-Max scoring module of one cluster (architecture V4).
//
// Computes, for each neuron i of the cluster,
//   s_i = e_i p_i + sum over distant clusters j' of max_i' W(i,j)(i',j') e_i'j' p_i'j'
// where p is the action potential. It is the Sum-of-Max module with the OR
// replaced by a comparator: each neuron keeps one B-bit intermediate register
// per distant cluster, which takes the potential carried by an arriving
// contribution (cpot[r], the potential of the sending neuron) when the
// neuron's connection bit is set and the potential is larger than the value
// held. `compute` adds the c-1 intermediate values and the neuron's own
// potential (if it is active) into the score register in one cycle.
//
// Timing as scoring_som. Potentials range over 0..l^2 (B = clog2(l^2+1)
// bits), scores over 0..c*l^2 (SW = clog2(c*l^2+1) bits).
module scoring_isom #(
  parameter int C = 25,
  parameter int L = 8,
  localparam int B  = $clog2(L * L + 1),
  localparam int SW = $clog2(C * L * L + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic [C-2:0]            cv,
  input  logic [C-2:0][L-1:0]     contrib,
  input  logic [C-2:0][B-1:0]     cpot,
  input  logic [L-1:0]            state,
  input  logic [L-1:0][B-1:0]     pot,
  input  logic                    compute,
  output logic [L-1:0][SW-1:0]    score
);

  logic [C-2:0][L-1:0][B-1:0] acc;
  logic [L-1:0][SW-1:0] sum;

  always_comb begin
    for (int i = 0; i < L; i++) begin
      sum[i] = state[i] ? SW'(pot[i]) : '0;
      for (int r = 0; r < C - 1; r++) sum[i] = sum[i] + SW'(acc[r][i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      score <= '0;
    end else begin
      if (clear) begin
        acc <= '0;
      end else begin
        for (int r = 0; r < C - 1; r++)
          for (int i = 0; i < L; i++)
            if (cv[r] && contrib[r][i] && (cpot[r] > acc[r][i])) acc[r][i] <= cpot[r];
      end
      if (compute) score <= sum;
    end
  end

endmodule
