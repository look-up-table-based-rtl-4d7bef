// instr_decode: splits one 512-bit instruction word into per-slot operations.
//
// The extension adds four instructions: predict (one 24-bit field per slot,
// up to 21 fields in a word), DM store (two 192-bit stores per word, each
// {dataH0, dataL1, dataL0} of which the low 136 bits form a LUT configuration),
// IOMem store (IO_SLOTS single-bit stores per word) and IOMem read (IO_SLOTS
// single-bit reads per word). The field widths follow the published
// description; the opcode header, the "count" of active fields and the field
// positions are this design's own layout, given in lutnn_pkg.
// Purely combinational; it decodes the instruction register in the ID stage.
// If both DM stores of one word target the same memory, store 1 is written
// (each memory has a single write port); DM numbers >= SLOTS are ignored.
module instr_decode
  import lutnn_pkg::*;
#(
  parameter int unsigned SLOTS    = 8,
  parameter int unsigned IO_SLOTS = 8,
  parameter int unsigned DM_DEPTH = 2048,
  localparam int unsigned DM_AW   = $clog2(DM_DEPTH)
) (
  input  logic [INSTR_W-1:0]              instr_i,
  output predict_op_t  [SLOTS-1:0]        pred_o,
  output logic         [SLOTS-1:0]        dm_we_o,
  output logic         [SLOTS-1:0][DM_AW-1:0] dm_waddr_o,
  output lut_cfg_t     [SLOTS-1:0]        dm_wdata_o,
  output io_store_op_t [IO_SLOTS-1:0]     io_store_o,
  output io_read_op_t  [IO_SLOTS-1:0]     io_read_o
);

  opcode_t           opcode;
  logic [4:0]        count;

  always_comb begin
    opcode = opcode_t'(instr_i[INSTR_W-1 -: 3]);
    count  = instr_i[INSTR_W-4 -: 5];
  end

  function automatic logic [FIELD_W-1:0] field(input int unsigned k);
    return instr_i[k*FIELD_W +: FIELD_W];
  endfunction

  // Predict: field k runs in slot k.
  always_comb begin
    for (int unsigned s = 0; s < SLOTS; s++) begin
      logic [FIELD_W-1:0] f;
      f = field(s);
      pred_o[s].valid    = (opcode == OP_PREDICT) && (s < count);
      pred_o[s].lut_num  = f[FIELD_W-1 -: IO_AW];
      pred_o[s].out_addr = f[IO_AW-1:0];
    end
  end

  // DM store: route each of the two stores to the memory it names.
  always_comb begin
    for (int unsigned s = 0; s < SLOTS; s++) begin
      dm_we_o[s]    = 1'b0;
      dm_waddr_o[s] = '0;
      dm_wdata_o[s] = '0;
      for (int unsigned j = 0; j < 2; j++) begin
        // Target field: [20:16] DM number, [11:0] address; the data's bits
        // above the 136-bit configuration are not used.
        logic [DM_SEL_W-1:0] dm_num;
        logic [DM_AW-1:0]    dm_addr;
        lut_cfg_t            cfg;
        dm_num  = instr_i[2*DMS_DATA_W + j*FIELD_W + 16 +: DM_SEL_W];
        dm_addr = instr_i[2*DMS_DATA_W + j*FIELD_W +: DM_AW];
        cfg     = instr_i[j*DMS_DATA_W +: CFG_W];
        if (opcode == OP_DM_STORE && j < count && 32'(dm_num) == s) begin
          dm_we_o[s]    = 1'b1;
          dm_waddr_o[s] = dm_addr;
          dm_wdata_o[s] = cfg;
        end
      end
    end
  end

  // IOMem store and read: field k is handled by IO slot k.
  always_comb begin
    for (int unsigned k = 0; k < IO_SLOTS; k++) begin
      logic [FIELD_W-1:0] f;
      f = field(k);
      io_store_o[k].valid = (opcode == OP_IO_STORE) && (k < count);
      io_store_o[k].addr  = f[IO_AW-1:0];
      io_store_o[k].value = f[IO_AW];
      io_read_o[k].valid  = (opcode == OP_IO_READ) && (k < count);
      io_read_o[k].addr   = f[IO_AW-1:0];
    end
  end

endmodule
