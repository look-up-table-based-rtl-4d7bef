// predict_slot: one slot of the predict instruction, with its own data memory.
//
// A slot evaluates one 6-input LUT neuron per clock, pipelined over the
// decode, execute, memory-access and write-back stages of the processor
// (fetch happens before the instruction reaches the slot):
//   ID : the LUT number addresses the slot's data memory (lut_dm), which
//        returns the 136-bit configuration at the next edge.
//   EX : the six 12-bit input references of the configuration go out on six
//        IOMem read ports; the six returned bits form the truth-table index.
//   MEM: the predict multiplexer picks the indexed bit of the 64-bit table.
//   WB : the bit is written to IOMem at the instruction's output address.
// An instruction entering ID in cycle t has its result written at the end of
// cycle t+3; counting the fetch stage, that is the 5-cycle latency of the
// published design, with one new predict accepted every cycle.
// The stage assignment follows the published block diagram. The slot does not
// detect IOMem read-after-write hazards: a predict that reads a bit written by
// an earlier instruction must enter ID at least three cycles after it, as the
// program (compiler) schedules it. The DM write port is driven by the DM store
// instruction in the ID stage.
module predict_slot
  import lutnn_pkg::*;
#(
  parameter int unsigned DM_DEPTH = 2048,
  localparam int unsigned DM_AW   = $clog2(DM_DEPTH)
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  // ID stage: predict issue
  input  predict_op_t                 op_i,
  // ID stage: DM store into this slot's memory
  input  logic                        dm_we_i,
  input  logic [DM_AW-1:0]            dm_waddr_i,
  input  lut_cfg_t                    dm_wdata_i,
  // EX stage: IOMem reads of the six neuron inputs
  output io_addr_t [LUT_K-1:0]        io_raddr_o,
  input  logic [LUT_K-1:0]            io_rdata_i,
  // WB stage: IOMem write-back
  output logic                        wb_we_o,
  output io_addr_t                    wb_addr_o,
  output logic                        wb_data_o
);

  // ---------------- ID -> EX ----------------
  lut_cfg_t cfg_ex;
  logic     vld_ex;
  io_addr_t oaddr_ex;

  lut_dm #(.DEPTH(DM_DEPTH)) u_dm (
    .clk_i   (clk_i),
    .re_i    (op_i.valid),
    .raddr_i (op_i.lut_num[DM_AW-1:0]),
    .rdata_o (cfg_ex),
    .we_i    (dm_we_i),
    .waddr_i (dm_waddr_i),
    .wdata_i (dm_wdata_i)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      vld_ex   <= 1'b0;
      oaddr_ex <= '0;
    end else begin
      vld_ex   <= op_i.valid;
      oaddr_ex <= op_i.out_addr;
    end
  end

  // ---------------- EX: IOMem reads ----------------
  assign io_raddr_o = cfg_ex.sel;

  logic                vld_mem;
  io_addr_t            oaddr_mem;
  logic [LUT_BITS-1:0] lut_mem;
  logic [LUT_K-1:0]    idx_mem;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      vld_mem   <= 1'b0;
      oaddr_mem <= '0;
      lut_mem   <= '0;
      idx_mem   <= '0;
    end else begin
      vld_mem   <= vld_ex;
      oaddr_mem <= oaddr_ex;
      lut_mem   <= cfg_ex.lut;
      idx_mem   <= io_rdata_i;
    end
  end

  // ---------------- MEM: predict multiplexer ----------------
  logic out_mem;

  predict_mux u_mux (
    .lut_i (lut_mem),
    .idx_i (idx_mem),
    .out_o (out_mem)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wb_we_o   <= 1'b0;
      wb_addr_o <= '0;
      wb_data_o <= 1'b0;
    end else begin
      wb_we_o   <= vld_mem;
      wb_addr_o <= oaddr_mem;
      wb_data_o <= out_mem;
    end
  end

endmodule
