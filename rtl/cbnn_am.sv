// cbnn_am: Sparse clustered-neural-network (Sparse-CbNN) associative memory
// for oriented edge detection.
//
// The network has C clusters (one per element of an N x N patch) of L
// neurons (one per non-zero quantised intensity). Patterns are stored as
// binary connections between the active neurons of different clusters; a
// noisy patch is decoded by Algorithm-1 style iterations (initialisation,
// then ITER times a dynamic rule followed by an activation rule). The
// datapath follows the four-part organisation of the architecture:
//   - one Serial Pass Module (spm) per cluster, emitting the indexes of the
//     cluster's active neurons one per cycle;
//   - one storing module per cluster, holding C-1 block RAMs of connections;
//     while decoding, every index read there yields the "contribution" of
//     that neuron to each distant cluster;
//   - one scoring module per cluster, implementing the dynamic rule chosen
//     by ARCH (Boolean equation, SoM or I-SoM);
//   - one k-G-WtA activation module for the whole network (not in V1, where
//     the Boolean equation already gives the next states).
// The initialisation (cluster_init per cluster) is Hamming-like for V1-V3
// and Euclidean-like (S nearest values, action potentials) for V4.
//
// Interface: a command is accepted when cmd_valid and cmd_ready are high.
//   CMD_CLEAR   erases all connections (L cycles).
//   CMD_STORE   stores `patch` as a pattern (read-modify-write, 4 cycles).
//   CMD_DECODE  decodes `patch`; `done` pulses for one cycle when the ITER
//               iterations are over, `states` then holds the C x L neuron
//               states (neuron i of cluster j at states[j][i] = value i+1).
// patch[j] is the quantised value of element j: 0 = no edge, 1..L.
//
// Timing of one decoding iteration, with a_max the largest number of active
// neurons in a cluster: 1 cycle to load the SPMs, max(a_max,1) cycles of
// contributions, 1 cycle for the last block-RAM read to reach the scoring
// modules, 1 cycle for the sum (adder tree / AND), then 1 cycle to write the
// states (V1) or SW+1 cycles of k-G-WtA (V2-V4, SW = score width). A decode
// takes the sum of its iterations plus 2 cycles (command, done).
// k starts at K_INIT and drops by K_STEP after each iteration, never below 1.
// The sequencing (commands, state machine, cycle counts) is this design's
// own; the article describes the four modules and the rules they apply.
module cbnn_am
  import cbnn_pkg::*;
#(
  parameter int    C      = 25,
  parameter int    L      = 8,
  parameter arch_e ARCH   = ARCH_V4,
  parameter int    ITER   = 4,
  parameter int    S      = 8,
  parameter int    K_INIT = default_k_init(ARCH, C, ITER),
  parameter int    K_STEP = default_k_step(ARCH, C),
  localparam int   VW     = $clog2(L + 1),
  localparam int   IW     = $clog2(L),
  localparam int   B      = pot_width(L),
  localparam int   SW     = score_width(ARCH, C, L),
  localparam int   N      = C * L,
  localparam int   KW     = $clog2(N + 1),
  localparam int   ITW    = (ITER > 1) ? $clog2(ITER) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cmd_valid,
  input  cmd_e                  cmd,
  input  logic [C-1:0][VW-1:0]  patch,
  output logic                  cmd_ready,
  output logic                  done,
  output logic [C-1:0][L-1:0]   states
);

  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_ST_LOAD, S_ST_RD, S_ST_WR,
    S_LOAD, S_SEND, S_ACC, S_SUM, S_ACT, S_UPD, S_DONE
  } fsm_e;

  fsm_e fsm;

  logic [C-1:0][L-1:0]         state_q;
  logic [C-1:0][L-1:0][B-1:0]  pot_q;
  logic [C-1:0]                pat_vld;
  logic [C-1:0][IW-1:0]        pat_idx;
  logic [KW-1:0]               k_q;
  logic [ITW-1:0]              it_q;
  logic [IW-1:0]               cnt;

  logic [C-1:0][L-1:0]         init_state;
  logic [C-1:0][L-1:0][B-1:0]  init_pot;

  logic [C-1:0]                spm_valid, spm_last;
  logic [C-1:0][IW-1:0]        spm_idx;

  logic [C-1:0]                sm_cv;
  logic [C-1:0][C-2:0][L-1:0]  sm_contrib;
  logic [C-1:0][B-1:0]         sm_cpot;

  logic [C-1:0][L-1:0][SW-1:0] score;
  logic [C-1:0][L-1:0]         bool_next;

  logic                        kg_done;
  logic [N-1:0]                kg_win;

  logic spm_load, spm_step, sc_clear, sc_acc, sc_compute, all_last;

  assign spm_load   = (fsm == S_LOAD) || (fsm == S_ST_LOAD);
  assign spm_step   = (fsm == S_SEND) || (fsm == S_ST_RD);
  assign sc_clear   = (fsm == S_LOAD);
  assign sc_acc     = (fsm == S_SEND) || (fsm == S_ACC);
  assign sc_compute = (fsm == S_SUM);
  assign all_last   = &(~spm_valid | spm_last);

  assign cmd_ready = (fsm == S_IDLE);
  assign done      = (fsm == S_DONE);
  assign states    = state_q;

  // ------------------------------------------------------------ clusters
  for (genvar j = 0; j < C; j++) begin : g_cl
    logic [C-2:0]          peer_valid;
    logic [C-2:0][IW-1:0]  peer_idx;
    logic [C-2:0]          cv;
    logic [C-2:0][L-1:0]   contrib;
    logic [C-2:0][B-1:0]   cpot;
    logic [C-2:0]          bypass;

    for (genvar r = 0; r < C - 1; r++) begin : g_slot
      localparam int JP = slot_cluster(j, r);
      localparam int RP = cluster_slot(JP, j);
      assign peer_valid[r] = pat_vld[JP];
      assign peer_idx[r]   = pat_idx[JP];
      assign cv[r]         = sm_cv[JP] && sc_acc;
      assign contrib[r]    = sm_contrib[JP][RP];
      assign cpot[r]       = sm_cpot[JP];
      assign bypass[r]     = (state_q[JP] == '0);
    end

    cluster_init #(.L(L)) u_init (
      .euclid(ARCH == ARCH_V4),
      .vin   (patch[j]),
      .s     (VW'(S)),
      .state (init_state[j]),
      .pot   (init_pot[j])
    );

    spm #(.L(L)) u_spm (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (spm_load),
      .states_in(state_q[j]),
      .step     (spm_step),
      .valid    (spm_valid[j]),
      .idx      (spm_idx[j]),
      .last     (spm_last[j])
    );

    storing_module #(.C(C), .L(L), .B(B)) u_store (
      .clk          (clk),
      .rst_n        (rst_n),
      .clr          (fsm == S_CLR),
      .clr_addr     (cnt),
      .rd           (spm_step && spm_valid[j]),
      .idx          (spm_idx[j]),
      .wr           ((fsm == S_ST_WR) && sm_cv[j]),
      .peer_valid   (peer_valid),
      .peer_idx     (peer_idx),
      .pot          (pot_q[j]),
      .contrib_valid(sm_cv[j]),
      .contrib      (sm_contrib[j]),
      .contrib_pot  (sm_cpot[j])
    );

    if (ARCH == ARCH_V1) begin : g_bool
      scoring_bool #(.C(C), .L(L)) u_score (
        .clk       (clk),
        .rst_n     (rst_n),
        .clear     (sc_clear),
        .bypass    (bypass),
        .cv        (cv),
        .contrib   (contrib),
        .state     (state_q[j]),
        .compute   (sc_compute),
        .next_state(bool_next[j])
      );
      assign score[j] = '0;
    end else if (ARCH == ARCH_V4) begin : g_isom
      scoring_isom #(.C(C), .L(L)) u_score (
        .clk    (clk),
        .rst_n  (rst_n),
        .clear  (sc_clear),
        .cv     (cv),
        .contrib(contrib),
        .cpot   (cpot),
        .state  (state_q[j]),
        .pot    (pot_q[j]),
        .compute(sc_compute),
        .score  (score[j])
      );
      assign bool_next[j] = '0;
    end else begin : g_som
      scoring_som #(.C(C), .L(L)) u_score (
        .clk    (clk),
        .rst_n  (rst_n),
        .clear  (sc_clear),
        .cv     (cv),
        .contrib(contrib),
        .state  (state_q[j]),
        .compute(sc_compute),
        .score  (score[j])
      );
      assign bool_next[j] = '0;
    end
  end

  // ---------------------------------------------------- activation module
  if (ARCH != ARCH_V1) begin : g_act
    kgwta #(.N(N), .SW(SW)) u_kgwta (
      .clk  (clk),
      .rst_n(rst_n),
      .start(fsm == S_SUM),
      .k    (k_q),
      .score(score),
      .busy (),
      .done (kg_done),
      .win  (kg_win)
    );
  end else begin : g_noact
    assign kg_done = 1'b0;
    assign kg_win  = '0;
  end

  // ------------------------------------------------------------ sequencing
  // the contribution phase of an iteration lasts at most L cycles (a_max <= L)
  logic [IW:0] send_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               send_cnt <= '0;
    else if (fsm == S_SEND)   send_cnt <= send_cnt + (IW+1)'(1);
    else                      send_cnt <= '0;
  end
  a_send_bounded : assert property (@(posedge clk) disable iff (!rst_n)
    (fsm == S_SEND) |-> (int'(send_cnt) < L))
    else $error("cbnn_am: serial pass longer than a cluster");
  a_k_positive : assert property (@(posedge clk) disable iff (!rst_n)
    (fsm == S_SUM && ARCH != ARCH_V1) |-> (k_q != '0))
    else $error("cbnn_am: k-G-WtA started with k = 0");

  logic last_iter;
  assign last_iter = (int'(it_q) == ITER - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm     <= S_IDLE;
      state_q <= '0;
      pot_q   <= '0;
      pat_vld <= '0;
      pat_idx <= '0;
      k_q     <= '0;
      it_q    <= '0;
      cnt     <= '0;
    end else begin
      case (fsm)
        S_IDLE: if (cmd_valid) begin
          case (cmd)
            CMD_CLEAR: begin
              cnt <= '0;
              fsm <= S_CLR;
            end
            CMD_STORE: begin
              for (int j = 0; j < C; j++) begin
                pat_vld[j] <= (patch[j] != '0) && (int'(patch[j]) <= L);
                pat_idx[j] <= IW'(int'(patch[j]) - 1);
                for (int i = 0; i < L; i++) state_q[j][i] <= (int'(patch[j]) == i + 1);
              end
              fsm <= S_ST_LOAD;
            end
            CMD_DECODE: begin
              state_q <= init_state;
              pot_q   <= init_pot;
              k_q     <= KW'(K_INIT);
              it_q    <= '0;
              fsm     <= S_LOAD;
            end
            default: fsm <= S_IDLE;
          endcase
        end
        S_CLR: begin
          cnt <= cnt + IW'(1);
          if (int'(cnt) == L - 1) fsm <= S_IDLE;
        end
        S_ST_LOAD: fsm <= S_ST_RD;
        S_ST_RD:   fsm <= S_ST_WR;
        S_ST_WR:   fsm <= S_IDLE;
        S_LOAD:    fsm <= S_SEND;
        S_SEND:    if (all_last) fsm <= S_ACC;
        S_ACC:     fsm <= S_SUM;
        S_SUM:     fsm <= (ARCH == ARCH_V1) ? S_UPD : S_ACT;
        S_UPD, S_ACT: begin
          if ((fsm == S_UPD) || kg_done) begin
            state_q <= (fsm == S_UPD) ? bool_next : kg_win;
            if (last_iter) begin
              fsm <= S_DONE;
            end else begin
              it_q <= it_q + ITW'(1);
              k_q  <= (int'(k_q) > K_STEP) ? k_q - KW'(K_STEP) : KW'(1);
              fsm  <= S_LOAD;
            end
          end
        end
        S_DONE:  fsm <= S_IDLE;
        default: fsm <= S_IDLE;
      endcase
    end
  end

endmodule
