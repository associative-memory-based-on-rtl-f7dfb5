// cluster_init: initialisation rule of one cluster (combinational).
//
// Input: the quantised value vin of the cluster's patch element, 0 meaning
// "no edge" (no neuron), 1..l selecting neuron vin-1; values above l are
// treated as l. Neuron i stands for value v_i = i+1.
//
// Action potential of every neuron (Euclidean distance, parabolic kernel):
//   p_i = l^2 - (vin - v_i)^2,   and p_i = 0 when vin = 0.
// Hamming-like initialisation (euclid = 0): only neuron vin-1 is active.
// Euclidean-like initialisation (euclid = 1): the s neurons with the highest
// potentials, i.e. the s values nearest to vin, are active; equal potentials
// are ranked by lower index first (this design's choice). A cluster with
// vin = 0 has no active neuron in either mode (this design's choice: noise
// is applied to edge pixels, background pixels stay empty).
module cluster_init #(
  parameter int L = 8,
  localparam int VW = $clog2(L + 1),
  localparam int B  = $clog2(L * L + 1)
) (
  input  logic                euclid,
  input  logic [VW-1:0]       vin,
  input  logic [VW-1:0]       s,
  output logic [L-1:0]        state,
  output logic [L-1:0][B-1:0] pot
);

  int v;
  int rank [L];

  always_comb begin
    v = (int'(vin) > L) ? L : int'(vin);
    for (int i = 0; i < L; i++) begin
      pot[i] = (v == 0) ? '0 : B'(L * L - (v - (i + 1)) * (v - (i + 1)));
    end
    for (int i = 0; i < L; i++) begin
      rank[i] = 0;
      for (int q = 0; q < L; q++)
        if ((pot[q] > pot[i]) || ((pot[q] == pot[i]) && (q < i))) rank[i] = rank[i] + 1;
    end
    for (int i = 0; i < L; i++) begin
      if (v == 0)       state[i] = 1'b0;
      else if (!euclid) state[i] = (v == i + 1);
      else              state[i] = (rank[i] < int'(s));
    end
  end

endmodule
