// scoring_bool: Boolean-equation module of one cluster (architecture V1).
//
// A neuron becomes active when it is connected to at least one active neuron
// in every cluster that holds an active neuron. Per neuron there is one
// 1-bit intermediate register per distant cluster, ORed with the
// contributions arriving from that cluster. The by-pass: at `clear` (start
// of an iteration) the register of a distant cluster without any active
// neuron (bypass[r]) is set to 1 instead of 0, so that cluster is ignored.
// `compute` ANDs the c-1 registers with the previous-state term of the
// neuron and registers the new state. The previous-state term is e_i, or 1
// when this cluster itself has no active neuron (so that an erased cluster
// can be filled in); this reading of the "previous state" input is this
// design's choice.
//
// Timing as scoring_som; the output is the next state vector, no separate
// activation module is needed.
module scoring_bool #(
  parameter int C = 25,
  parameter int L = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic [C-2:0]            bypass,
  input  logic [C-2:0]            cv,
  input  logic [C-2:0][L-1:0]     contrib,
  input  logic [L-1:0]            state,
  input  logic                    compute,
  output logic [L-1:0]            next_state
);

  logic [C-2:0][L-1:0] acc;
  logic [L-1:0] conj;
  logic own_empty;

  assign own_empty = (state == '0);

  always_comb begin
    for (int i = 0; i < L; i++) begin
      conj[i] = state[i] || own_empty;
      for (int r = 0; r < C - 1; r++) conj[i] = conj[i] && acc[r][i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      next_state <= '0;
    end else begin
      if (clear) begin
        for (int r = 0; r < C - 1; r++) acc[r] <= {L{bypass[r]}};
      end else begin
        for (int r = 0; r < C - 1; r++)
          if (cv[r]) acc[r] <= acc[r] | contrib[r];
      end
      if (compute) next_state <= conj;
    end
  end

endmodule
