// lutnn_asip: LUT-neuron inference extension of a VLIW processor (top).
//
// Networks whose neurons are 6-input, 1-output Boolean functions are evaluated
// one neuron per slot per clock. The binary inputs and every neuron output live
// in IOMem, a register file of IOMEM_DEPTH single bits. Each of the SLOTS predict
// slots owns a data memory of DM_DEPTH LUT configurations. A predict field names
// a configuration (LUT number) and an IOMem output bit; the slot reads the
// configuration, fetches the six input bits it references from IOMem, picks
// the addressed truth-table bit and writes it back to IOMem, where neurons of
// the next layer find it.
//
// Interface: instr_i is the 512-bit instruction word delivered by the host
// processor's fetch stage each cycle (all-zero = no operation); see lutnn_pkg
// for its layout. rd_valid_o/rd_addr_o/rd_data_o return the bits requested by
// an IOMem read instruction.
//
// Timing (5 stages, IF ID EX MEM WB): a word on instr_i in cycle t is latched
// into the instruction register (IR) at the end of cycle t and decoded in
// cycle t+1. DM stores are written at the end of t+1. Predict, IOMem store
// and IOMem read pass through EX (t+2, IOMem read), MEM (t+3) and WB (t+4):
// IOMem writes happen at the end of t+4, so their results are visible from
// cycle t+5, and read results are on rd_* during cycle t+4. A new instruction
// is accepted every cycle. IOMem is read in EX, so an instruction that reads a
// bit written by an earlier one must be issued at least 3 cycles after it;
// as in a VLIW machine, the program schedules this and the hardware does not
// check it.
//
// Follows the published design: the four instructions, the 1-bit IOMem of 4096
// entries, one 2048 x 136 data memory per slot, 8 slots by default (the word
// has room for 21), 8 IOMem store slots, the stage in which each step is done.
// This design's own choices: the instruction encoding, the IOMem read
// instruction's width, write priority between slots (highest slot wins),
// reset values, and the base processor being left outside (its fetch stage
// drives instr_i).
//
// Simulation assertions check the program rules the hardware relies on: no
// more active fields than slots, DM stores naming existing memories, known
// opcodes. They are disabled during reset, so lint reports rst_ni as used both
// synchronously (by the assertions) and asynchronously (by the flip-flops);
// the logic itself uses it only as an asynchronous reset.
module lutnn_asip
  import lutnn_pkg::*;
#(
  parameter int unsigned SLOTS       = 8,
  parameter int unsigned IO_SLOTS    = 8,
  parameter int unsigned IOMEM_DEPTH = 4096,
  parameter int unsigned DM_DEPTH    = 2048,
  localparam int unsigned DM_AW      = $clog2(DM_DEPTH)
) (
  input  logic                         clk_i,
  input  logic                         rst_ni,
  input  logic [INSTR_W-1:0]           instr_i,
  output logic [IO_SLOTS-1:0]          rd_valid_o,
  output io_addr_t [IO_SLOTS-1:0]      rd_addr_o,
  output logic [IO_SLOTS-1:0]          rd_data_o
);

  if (SLOTS < 1 || SLOTS > MAX_FIELDS) begin : g_bad_slots
    $error("SLOTS must be between 1 and %0d", MAX_FIELDS);
  end
  if (IO_SLOTS < 1 || IO_SLOTS > MAX_FIELDS) begin : g_bad_io_slots
    $error("IO_SLOTS must be between 1 and %0d", MAX_FIELDS);
  end
  if (IOMEM_DEPTH > (1 << IO_AW) || DM_DEPTH > (1 << IO_AW)) begin : g_bad_depth
    $error("memory depths are limited by the 12-bit address fields");
  end

  localparam int unsigned NRD = SLOTS * LUT_K + IO_SLOTS;
  localparam int unsigned NWR = SLOTS + IO_SLOTS;

  // ---------------- IF -> ID: instruction register ----------------
  logic [INSTR_W-1:0] ir_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) ir_q <= '0;
    else         ir_q <= instr_i;
  end

  // ---------------- Program rules (checked in simulation) ----------------
  // Fields beyond the configured slots would be dropped silently, and a DM
  // store naming a memory that does not exist would be lost: both are program
  // errors.
  opcode_t    ir_op;
  logic [4:0] ir_count;
  assign ir_op    = opcode_t'(ir_q[INSTR_W-1 -: 3]);
  assign ir_count = ir_q[INSTR_W-4 -: 5];

  a_predict_count : assert property (@(posedge clk_i) disable iff (!rst_ni)
    ir_op == OP_PREDICT |-> 32'(ir_count) <= SLOTS)
    else $error("predict word with %0d fields on %0d slots", ir_count, SLOTS);
  a_io_count : assert property (@(posedge clk_i) disable iff (!rst_ni)
    (ir_op == OP_IO_STORE || ir_op == OP_IO_READ) |-> 32'(ir_count) <= IO_SLOTS)
    else $error("IOMem store/read word with %0d fields on %0d IO slots", ir_count, IO_SLOTS);
  a_dm_store : assert property (@(posedge clk_i) disable iff (!rst_ni)
    ir_op == OP_DM_STORE |-> ir_count <= 5'd2
      && (ir_count < 5'd1 || 32'(ir_q[2*DMS_DATA_W + 16 +: DM_SEL_W]) < SLOTS)
      && (ir_count < 5'd2 || 32'(ir_q[2*DMS_DATA_W + FIELD_W + 16 +: DM_SEL_W]) < SLOTS))
    else $error("DM store word names a missing store or data memory");
  a_opcode : assert property (@(posedge clk_i) disable iff (!rst_ni)
    ir_q[INSTR_W-1 -: 3] <= 3'(OP_IO_READ))
    else $error("unknown opcode %0d", ir_q[INSTR_W-1 -: 3]);

  // ---------------- ID: decode ----------------
  predict_op_t  [SLOTS-1:0]            pred;
  logic         [SLOTS-1:0]            dm_we;
  logic         [SLOTS-1:0][DM_AW-1:0] dm_waddr;
  lut_cfg_t     [SLOTS-1:0]            dm_wdata;
  io_store_op_t [IO_SLOTS-1:0]         ios_id;
  io_read_op_t  [IO_SLOTS-1:0]         ior_id;

  instr_decode #(
    .SLOTS    (SLOTS),
    .IO_SLOTS (IO_SLOTS),
    .DM_DEPTH (DM_DEPTH)
  ) u_dec (
    .instr_i    (ir_q),
    .pred_o     (pred),
    .dm_we_o    (dm_we),
    .dm_waddr_o (dm_waddr),
    .dm_wdata_o (dm_wdata),
    .io_store_o (ios_id),
    .io_read_o  (ior_id)
  );

  // ---------------- IOMem ports ----------------
  logic [NRD-1:0][IO_AW-1:0] io_raddr;
  logic [NRD-1:0]            io_rdata;
  logic [NWR-1:0]            io_we;
  logic [NWR-1:0][IO_AW-1:0] io_waddr;
  logic [NWR-1:0]            io_wdata;

  iomem #(
    .DEPTH (IOMEM_DEPTH),
    .NRD   (NRD),
    .NWR   (NWR)
  ) u_iomem (
    .clk_i   (clk_i),
    .rst_ni  (rst_ni),
    .raddr_i (io_raddr),
    .rdata_o (io_rdata),
    .we_i    (io_we),
    .waddr_i (io_waddr),
    .wdata_i (io_wdata)
  );

  // ---------------- predict slots ----------------
  for (genvar s = 0; s < SLOTS; s++) begin : g_slot
    io_addr_t [LUT_K-1:0] raddr;
    logic                 wb_we;
    io_addr_t             wb_addr;
    logic                 wb_data;

    predict_slot #(.DM_DEPTH(DM_DEPTH)) u_slot (
      .clk_i      (clk_i),
      .rst_ni     (rst_ni),
      .op_i       (pred[s]),
      .dm_we_i    (dm_we[s]),
      .dm_waddr_i (dm_waddr[s]),
      .dm_wdata_i (dm_wdata[s]),
      .io_raddr_o (raddr),
      .io_rdata_i (io_rdata[s*LUT_K +: LUT_K]),
      .wb_we_o    (wb_we),
      .wb_addr_o  (wb_addr),
      .wb_data_o  (wb_data)
    );

    for (genvar i = 0; i < LUT_K; i++) begin : g_rd
      assign io_raddr[s*LUT_K + i] = raddr[i];
    end
    assign io_we[s]    = wb_we;
    assign io_waddr[s] = wb_addr;
    assign io_wdata[s] = wb_data;
  end

  // ---------------- IOMem store / read slots: ID -> EX -> MEM -> WB ----------------
  io_store_op_t [IO_SLOTS-1:0] ios_ex, ios_mem, ios_wb;
  io_read_op_t  [IO_SLOTS-1:0] ior_ex;
  io_store_op_t [IO_SLOTS-1:0] ior_mem, ior_wb;  // address and bit read in EX

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ios_ex  <= '0;
      ios_mem <= '0;
      ios_wb  <= '0;
      ior_ex  <= '0;
      ior_mem <= '0;
      ior_wb  <= '0;
    end else begin
      ios_ex  <= ios_id;
      ios_mem <= ios_ex;
      ios_wb  <= ios_mem;
      ior_ex  <= ior_id;
      for (int unsigned k = 0; k < IO_SLOTS; k++) begin
        ior_mem[k].valid <= ior_ex[k].valid;
        ior_mem[k].addr  <= ior_ex[k].addr;
        ior_mem[k].value <= io_rdata[SLOTS*LUT_K + k];
      end
      ior_wb  <= ior_mem;
    end
  end

  for (genvar k = 0; k < IO_SLOTS; k++) begin : g_io
    assign io_raddr[SLOTS*LUT_K + k] = ior_ex[k].addr;
    assign io_we[SLOTS + k]          = ios_wb[k].valid;
    assign io_waddr[SLOTS + k]       = ios_wb[k].addr;
    assign io_wdata[SLOTS + k]       = ios_wb[k].value;
    assign rd_valid_o[k]             = ior_wb[k].valid;
    assign rd_addr_o[k]              = ior_wb[k].addr;
    assign rd_data_o[k]              = ior_wb[k].value;
  end

endmodule
