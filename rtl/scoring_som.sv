// scoring_som: Sum-of-Max scoring module of one cluster (architectures V2, V3).
//
// Computes, for each neuron i of the cluster, s_i = e_i + sum over distant
// clusters j' of max_i' W(i,j)(i',j') e_i'j'. Because the terms are single
// bits the max is an OR: each neuron keeps one 1-bit intermediate register
// per distant cluster, ORed with the contributions that arrive from that
// cluster, one per cycle (cv[r] marks a contribution on slot r). When all
// contributions have arrived, `compute` adds the c-1 intermediate bits and
// the previous state of the neuron in one cycle (adder tree) into the score
// register.
//
// Timing: `clear` zeroes the intermediate registers at the start of an
// iteration; contributions accumulate on every cycle they are valid; the
// score is registered at the end of the `compute` cycle. Scores range over
// 0..c, hence SW = clog2(c+1) bits.
module scoring_som #(
  parameter int C = 25,
  parameter int L = 8,
  localparam int SW = $clog2(C + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic [C-2:0]            cv,
  input  logic [C-2:0][L-1:0]     contrib,
  input  logic [L-1:0]            state,
  input  logic                    compute,
  output logic [L-1:0][SW-1:0]    score
);

  logic [C-2:0][L-1:0] acc;
  logic [L-1:0][SW-1:0] sum;

  always_comb begin
    for (int i = 0; i < L; i++) begin
      sum[i] = SW'(state[i]);
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
          if (cv[r]) acc[r] <= acc[r] | contrib[r];
      end
      if (compute) score <= sum;
    end
  end

endmodule
