// cbnn_pkg: types and helper functions shared by the Sparse-CbNN associative
// memory (clustered neural network with c clusters of l neurons each).
//
// arch_e selects one of the four architectures of the memory:
//   ARCH_V1  Hamming initialisation, Boolean-equation dynamic rule, no activation module
//   ARCH_V2  Hamming initialisation, Sum-of-Max (SoM) + Global-Winner-Takes-All (k = 1)
//   ARCH_V3  Hamming initialisation, SoM + k-Global-Winner-Takes-All
//   ARCH_V4  Euclidean initialisation, Integer-SoM (I-SoM) + k-Global-Winner-Takes-All
// cmd_e is the command set of the top level (clear memory, store a pattern,
// decode a patch). Slot numbering: every cluster j sees the c-1 other
// clusters through "slots" r = 0..c-2, slot r standing for cluster r when
// r < j and for cluster r+1 otherwise.
package cbnn_pkg;

  typedef enum logic [1:0] {ARCH_V1, ARCH_V2, ARCH_V3, ARCH_V4} arch_e;

  typedef enum logic [1:0] {CMD_NOP, CMD_CLEAR, CMD_STORE, CMD_DECODE} cmd_e;

  // Cluster reached through slot r of cluster j.
  function automatic int slot_cluster(int j, int r);
    return (r < j) ? r : r + 1;
  endfunction

  // Slot of cluster j that stands for distant cluster jp (jp != j).
  function automatic int cluster_slot(int j, int jp);
    return (jp < j) ? jp : jp - 1;
  endfunction

  // Integer square root (floor): side N of an N x N patch holding c clusters.
  function automatic int isqrt(int x);
    int r;
    r = 0;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  // Width of an action potential: values 0 .. l^2.
  function automatic int pot_width(int l);
    return $clog2(l * l + 1);
  endfunction

  // Width of a neuron score: SoM scores reach c, I-SoM scores reach c * l^2.
  function automatic int score_width(arch_e arch, int c, int l);
    return (arch == ARCH_V4) ? $clog2(c * l * l + 1) : $clog2(c + 1);
  endfunction

  // Initial k of k-G-WtA: 1 for G-WtA (V2), the number of iterations for V3,
  // 4 * N for V4 (N x N patches).
  function automatic int default_k_init(arch_e arch, int c, int iter);
    case (arch)
      ARCH_V3: return iter;
      ARCH_V4: return 4 * isqrt(c);
      default: return 1;
    endcase
  endfunction

  // Decrement of k after each iteration: 0 for V2, 1 for V3, N for V4.
  function automatic int default_k_step(arch_e arch, int c);
    case (arch)
      ARCH_V3: return 1;
      ARCH_V4: return isqrt(c);
      default: return 0;
    endcase
  endfunction

endpackage
