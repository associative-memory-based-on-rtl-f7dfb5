// conn_ram: one block RAM of connections between the neurons of a cluster
// and those of one distant cluster.
//
// DEPTH words (one per local neuron) of WIDTH bits (one per neuron of the
// distant cluster). Single port, synchronous: the word at `addr` appears on
// `rdata` one cycle later; a write in the same cycle returns the old word
// (read-first), which is the usual block-RAM behaviour. No reset: the
// contents are cleared by writing zeros to every address.
module conn_ram #(
  parameter int DEPTH = 8,
  parameter int WIDTH = 8,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
