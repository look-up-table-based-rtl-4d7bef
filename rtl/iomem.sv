// iomem: the input/output bit register file (IOMem).
//
// DEPTH single-bit registers (4096 in the published design), each addressable
// on its own with a 12-bit address. It holds the binary input image and every
// neuron output, so a neuron's output becomes an input of the next layer.
// Reads are combinational: NRD read ports (six per predict slot, plus the read
// ports of the IOMem read instruction). Writes happen on the clock edge
// through NWR write ports (one per predict slot for write-back, plus the
// ports of the IOMem store instruction). If several ports write the same bit
// in one cycle, the highest-numbered port wins; this priority, and clearing
// every bit at reset, are this design's choices.
module iomem
  import lutnn_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned NRD   = 56,
  parameter int unsigned NWR   = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  logic [NRD-1:0][AW-1:0] raddr_i,
  output logic [NRD-1:0]         rdata_o,
  input  logic [NWR-1:0]         we_i,
  input  logic [NWR-1:0][AW-1:0] waddr_i,
  input  logic [NWR-1:0]         wdata_i
);

  logic [DEPTH-1:0] bits_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      bits_q <= '0;
    end else begin
      for (int unsigned p = 0; p < NWR; p++) begin
        if (we_i[p]) bits_q[waddr_i[p]] <= wdata_i[p];
      end
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < NRD; p++) rdata_o[p] = bits_q[raddr_i[p]];
  end

endmodule
