// lutnn_pkg: types and constants shared by the LUT-neuron inference extension.
//
// A neuron is a 6-input, 1-output Boolean function (a 6-LUT). Its configuration
// word is 136 bits: the top 72 bits hold six 12-bit IOMem addresses (the
// neuron's input references), the low 64 bits hold the truth table. Input i
// contributes bit i of the 6-bit truth-table index, so the neuron's output is
// lut[{in5,in4,in3,in2,in1,in0}].
//
// The 512-bit instruction word layout defined here is this design's own: the
// field widths (24-bit predict fields holding a 12-bit LUT number and a 12-bit
// output address, 192-bit DM store data made of three 64-bit groups, at most
// 21 fields of 24 bits) follow the published description, the opcode header
// and the placement of fields are chosen here.
//
//   [511:509] opcode   [508:504] count (number of active fields, from field 0)
//   OP_PREDICT : field k = word[24k +: 24] = {lutNumber[11:0], outputAddr[11:0]}
//                the predict of field k runs in slot k
//   OP_IO_STORE: field k = word[24k +: 24], bit 12 = value, [11:0] = IOMem address
//   OP_IO_READ : field k = word[24k +: 24], [11:0] = IOMem address
//   OP_DM_STORE: store j (j = 0,1) data = word[192j +: 192] = {dataH0, dataL1, dataL0}
//                store j target = word[384+24j +: 24]: [20:16] DM number, [11:0] DM address
//                only the low 136 bits of the data are kept
package lutnn_pkg;

  localparam int unsigned INSTR_W    = 512;  // instruction word width
  localparam int unsigned FIELD_W    = 24;   // width of one predict field
  localparam int unsigned MAX_FIELDS = INSTR_W / FIELD_W;  // 21
  localparam int unsigned IO_AW      = 12;   // IOMem address width (4096 bits)
  localparam int unsigned LUT_K      = 6;    // inputs per neuron
  localparam int unsigned LUT_BITS   = 1 << LUT_K;  // 64 truth-table bits
  localparam int unsigned CFG_W      = LUT_K * IO_AW + LUT_BITS;  // 136
  localparam int unsigned DMS_DATA_W = 192;  // three 64-bit groups
  localparam int unsigned DM_SEL_W   = 5;    // DM number in a DM store

  typedef logic [IO_AW-1:0] io_addr_t;

  // One LUT configuration as held in a data memory (136 bits).
  typedef struct packed {
    io_addr_t [LUT_K-1:0] sel;  // sel[i] at bits [64+12i +: 12]
    logic [LUT_BITS-1:0]  lut;  // truth table, bit a = output for index a
  } lut_cfg_t;

  typedef enum logic [2:0] {
    OP_NOP      = 3'd0,
    OP_PREDICT  = 3'd1,
    OP_DM_STORE = 3'd2,
    OP_IO_STORE = 3'd3,
    OP_IO_READ  = 3'd4
  } opcode_t;

  typedef struct packed {
    logic     valid;
    io_addr_t lut_num;   // LUT position in the slot's data memory
    io_addr_t out_addr;  // IOMem bit receiving the output
  } predict_op_t;

  typedef struct packed {
    logic     valid;
    io_addr_t addr;  // DM address
    lut_cfg_t data;
  } dm_store_op_t;

  typedef struct packed {
    logic     valid;
    io_addr_t addr;
    logic     value;
  } io_store_op_t;

  typedef struct packed {
    logic     valid;
    io_addr_t addr;
  } io_read_op_t;

endpackage
