// predict_mux: the 64-to-1 "predict multiplexer" of one slot.
//
// The six input bits of a neuron, read from IOMem, form a 6-bit index (input i
// is bit i of the index); the index selects one bit of the neuron's 64-bit
// truth table, which is the neuron's output. Purely combinational; the slot
// registers the result at the end of its memory-access stage.
module predict_mux
  import lutnn_pkg::*;
(
  input  logic [LUT_BITS-1:0] lut_i,  // truth table, bit a = output for index a
  input  logic [LUT_K-1:0]    idx_i,  // {in5, ..., in0}
  output logic                out_o
);

  always_comb out_o = lut_i[idx_i];

endmodule
