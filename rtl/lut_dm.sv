// lut_dm: one specialized data memory ("DMX") holding LUT configurations.
//
// Each address holds one 136-bit neuron configuration (six 12-bit IOMem input
// references above a 64-bit truth table). One write port and one read port,
// as in the published design; both are synchronous, so the memory maps to
// block RAM. The read data appears one clock after the address (the predict
// slot addresses it in the decode stage and uses it in the execute stage).
// A read and a write of the same address in one cycle return the old word.
// The depth of 2048 follows the published block diagram; a 12-bit LUT number
// is cut to the low $clog2(DEPTH) bits. Contents are not reset.
module lut_dm
  import lutnn_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk_i,
  input  logic          re_i,
  input  logic [AW-1:0] raddr_i,
  output lut_cfg_t      rdata_o,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  lut_cfg_t      wdata_i
);

  lut_cfg_t mem [DEPTH];

  always_ff @(posedge clk_i) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

  always_ff @(posedge clk_i) begin
    if (re_i) rdata_o <= mem[raddr_i];
  end

endmodule
