// tb_predict_slot: one predict slot with a behavioural IOMem around it.
// Loads random LUT configurations, issues one predict per cycle and checks
// that each write-back appears exactly 3 cycles after the predict entered
// the slot (ID -> EX -> MEM -> WB), with the right address and the bit the
// reference evaluation of the neuron gives.
module tb_predict_slot;
  import lutnn_pkg::*;
  import lutnn_tb_pkg::*;

  localparam int unsigned DM_DEPTH = 2048, NCFG = 256;

  logic clk = 0, rst_n = 0;
  predict_op_t op;
  logic dm_we;
  logic [10:0] dm_waddr;
  lut_cfg_t dm_wdata;
  io_addr_t [LUT_K-1:0] io_raddr;
  logic [LUT_K-1:0] io_rdata;
  logic wb_we, wb_data;
  io_addr_t wb_addr;

  logic [4095:0] io;
  lut_cfg_t cfgs [NCFG];
  int checks = 0, failures = 0, cyc = 0;

  typedef struct { int cyc; io_addr_t addr; bit val; } exp_t;
  exp_t expq[$];

  predict_slot #(.DM_DEPTH(DM_DEPTH)) dut (
    .clk_i(clk), .rst_ni(rst_n), .op_i(op),
    .dm_we_i(dm_we), .dm_waddr_i(dm_waddr), .dm_wdata_i(dm_wdata),
    .io_raddr_o(io_raddr), .io_rdata_i(io_rdata),
    .wb_we_o(wb_we), .wb_addr_o(wb_addr), .wb_data_o(wb_data));

  // Behavioural IOMem (fixed contents during the test).
  always_comb for (int i = 0; i < LUT_K; i++) io_rdata[i] = io[io_raddr[i]];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Write-back monitor.
  always @(negedge clk) if (rst_n) begin
    if (wb_we) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("unexpected write-back at cycle %0d", cyc);
      end else begin
        automatic exp_t e = expq.pop_front();
        if (cyc != e.cyc || wb_addr != e.addr || wb_data != e.val) begin
          failures++;
          if (failures < 10)
            $display("wb cyc %0d addr %0d bit %b, expected cyc %0d addr %0d bit %b",
                     cyc, wb_addr, wb_data, e.cyc, e.addr, e.val);
        end
      end
    end
  end

  initial begin
    op = '0; dm_we = 0; dm_waddr = '0; dm_wdata = '0;
    for (int i = 0; i < 4096; i++) io[i] = 1'($urandom());
    #12 rst_n = 1;
    // Load configurations at spread addresses (address = 8*n + 3).
    for (int n = 0; n < NCFG; n++) begin
      @(negedge clk);
      cfgs[n] = rand_cfg(0, 4096);
      dm_we = 1; dm_waddr = 11'(8 * n + 3); dm_wdata = cfgs[n];
    end
    @(negedge clk); dm_we = 0;
    // Back-to-back predicts, with an idle cycle now and then.
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (t % 7 == 6) begin
        op = '0;
      end else begin
        automatic int unsigned n = $urandom() % NCFG;
        op.valid = 1; op.lut_num = 12'(8 * n + 3); op.out_addr = 12'($urandom());
        expq.push_back('{cyc + 3, op.out_addr, eval_lut(cfgs[n], io)});
      end
    end
    @(negedge clk); op = '0;
    repeat (6) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++; $display("%0d write-backs missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
