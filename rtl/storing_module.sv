// storing_module: connection store of one cluster.
//
// Holds c-1 block RAMs (conn_ram), one per distant cluster, each with l
// words of l bits: bit i' of word i is the connection between neuron i of
// this cluster and neuron i' of the distant cluster. Every connection is
// thus kept twice, once on each side, so that each cluster reads its own
// copy independently.
//
// Operations (at most one per cycle, clr > wr > rd):
//   clr  write zeros at clr_addr in every RAM (used to erase the memory).
//   rd   read word idx of every RAM. One cycle later contrib_valid is high,
//        contrib[r] holds the word read from the RAM of slot r and
//        contrib_pot the action potential of neuron idx. While decoding this
//        is the "contribution" of neuron idx to the c-1 distant clusters.
//   wr   second step of storing: writes back the word read by the previous
//        rd, with the bit of the active neuron of each distant cluster set
//        (peer_valid/peer_idx, one per slot).
// Storing a pattern is therefore rd at the cluster's active neuron followed
// by wr, as the article describes (read, then set the connections).
module storing_module #(
  parameter int C = 25,
  parameter int L = 8,
  parameter int B = 7,
  localparam int IW = $clog2(L)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic [IW-1:0]           clr_addr,
  input  logic                    rd,
  input  logic [IW-1:0]           idx,
  input  logic                    wr,
  input  logic [C-2:0]            peer_valid,
  input  logic [C-2:0][IW-1:0]    peer_idx,
  input  logic [L-1:0][B-1:0]     pot,
  output logic                    contrib_valid,
  output logic [C-2:0][L-1:0]     contrib,
  output logic [B-1:0]            contrib_pot
);

  logic [IW-1:0] addr;
  logic [IW-1:0] wr_addr_q;
  logic          we;

  always_comb begin
    if (clr)      addr = clr_addr;
    else if (wr)  addr = wr_addr_q;
    else          addr = idx;
  end

  assign we = clr || wr;

  for (genvar r = 0; r < C - 1; r++) begin : g_ram
    logic [L-1:0] wdata;
    always_comb begin
      wdata = '0;
      if (!clr) begin
        wdata = contrib[r];
        if (peer_valid[r]) wdata[peer_idx[r]] = 1'b1;
      end
    end
    conn_ram #(.DEPTH(L), .WIDTH(L)) u_ram (
      .clk  (clk),
      .we   (we),
      .addr (addr),
      .wdata(wdata),
      .rdata(contrib[r])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      contrib_valid <= 1'b0;
      contrib_pot   <= '0;
      wr_addr_q     <= '0;
    end else begin
      contrib_valid <= rd && !clr && !wr;
      if (rd && !clr && !wr) begin
        contrib_pot <= pot[idx];
        wr_addr_q   <= idx;
      end
    end
  end

endmodule
