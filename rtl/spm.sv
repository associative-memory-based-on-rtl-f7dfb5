// spm: Serial Pass Module of one cluster.
//
// Turns the state vector of the l neurons of a cluster into a stream of
// indexes of its active neurons, one per cycle. `load` captures the state
// vector; afterwards `valid`/`idx` present the lowest-numbered remaining
// active neuron, and `step` clears that bit so the next one appears in the
// following cycle. A cluster with a_j active neurons therefore needs a_j
// cycles. Lowest-index-first order is this design's choice; the article
// only fixes one index per cycle with the sent bit cleared.
//
// Outputs: valid (a bit is left), idx (its address), last (it is the only
// bit left). All outputs are decoded from the internal vector register;
// load has priority over step.
module spm #(
  parameter int L = 8,
  localparam int IW = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [L-1:0]  states_in,
  input  logic          step,
  output logic          valid,
  output logic [IW-1:0] idx,
  output logic          last
);

  logic [L-1:0] vec;

  always_comb begin
    idx = '0;
    for (int i = L - 1; i >= 0; i--)
      if (vec[i]) idx = IW'(i);
  end

  assign valid = |vec;
  assign last  = valid && ((vec & (vec - L'(1))) == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vec <= '0;
    end else if (load) begin
      vec <= states_in;
    end else if (step && valid) begin
      vec[idx] <= 1'b0;
    end
  end

endmodule
