// kgwta: k-Global-Winner-Takes-All activation module, shared by all clusters.
//
// Activates every neuron whose score is at least the k-th highest score of
// the network (ties included, so more than k neurons may win). The threshold
// T is found bit-serially, most significant bit first: starting from T = 0,
// in each of the SW cycles the module tries T | 2^b and keeps that bit when
// at least k scores are >= the trial value. After the last bit T is the
// largest value with at least k scores >= T, i.e. the k-th highest score.
// Neurons with score >= T and score > 0 win; excluding zero scores is this
// design's choice (it keeps an all-zero network from activating everything).
// With k = 1 the module performs plain G-WtA.
//
// Timing: `start` (one cycle, while idle) samples k; the scores must be
// stable from the next cycle until `done`. The search takes SW cycles
// (busy high); `done` pulses in the cycle after, with `win` valid from then
// until the next start. k must be at least 1.
module kgwta #(
  parameter int N  = 200,
  parameter int SW = 11,
  localparam int KW = $clog2(N + 1),
  localparam int BW = (SW > 1) ? $clog2(SW) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [KW-1:0]        k,
  input  logic [N-1:0][SW-1:0] score,
  output logic                 busy,
  output logic                 done,
  output logic [N-1:0]         win
);

  logic [SW-1:0] thr;
  logic [SW-1:0] trial;
  logic [BW-1:0] bitpos;
  logic [KW-1:0] k_q;
  logic [KW-1:0] cnt;
  logic [SW-1:0] thr_next;

  always_comb begin
    trial = thr | (SW'(1) << bitpos);
    cnt   = '0;
    for (int n = 0; n < N; n++) cnt = cnt + KW'(score[n] >= trial);
    thr_next = (cnt >= k_q) ? trial : thr;
  end

  // a search is started only while idle, and with at least one winner asked for
  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n) start |-> (!busy && k != '0))
    else $error("kgwta: start while busy or with k = 0");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr    <= '0;
      bitpos <= '0;
      k_q    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      win    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          thr    <= '0;
          bitpos <= BW'(SW - 1);
          k_q    <= k;
          busy   <= 1'b1;
        end
      end else begin
        thr <= thr_next;
        if (bitpos == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
          for (int n = 0; n < N; n++)
            win[n] <= (score[n] >= thr_next) && (score[n] != '0);
        end else begin
          bitpos <= bitpos - BW'(1);
        end
      end
    end
  end

endmodule
