// lutnn_net_runner: runs a 2580-neuron network (60 three-level classifiers of
// 43 six-input neurons: 36 + 6 + 1) on a lutnn_asip with SLOTS predict slots
// and checks every neuron output against a reference evaluation.
// Neurons are issued in order, SLOTS per word, words packed across level
// boundaries, so the predict phase takes ceil(2580 / SLOTS) words; the runner
// checks that count and that every neuron's inputs were produced at least
// three words before it (the pipeline's read-after-write distance).
// Used by tb_lutnn_slots; reports through its ports when done.
module lutnn_net_runner
  import lutnn_pkg::*;
  import lutnn_tb_pkg::*;
#(
  parameter int unsigned SLOTS = 8
) (
  output bit done,
  output int checks,
  output int failures,
  output int pred_words
);
  localparam int unsigned IO_SLOTS = 8;
  localparam int unsigned N_IN = 512, N_CLS = 60;
  localparam int unsigned L0 = 36 * N_CLS, L1 = 6 * N_CLS;
  localparam int unsigned N_LUT = L0 + L1 + N_CLS;

  logic clk = 0, rst_n = 0;
  word_t instr;
  logic [IO_SLOTS-1:0] rd_valid, rd_data;
  io_addr_t [IO_SLOTS-1:0] rd_addr;

  lutnn_asip #(.SLOTS(SLOTS)) dut (
    .clk_i(clk), .rst_ni(rst_n), .instr_i(instr),
    .rd_valid_o(rd_valid), .rd_addr_o(rd_addr), .rd_data_o(rd_data));

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [4095:0] io;
  lut_cfg_t cfg [N_LUT];
  int word_of [4096];  // predict word that writes each IOMem bit (-1: input)
  typedef struct { io_addr_t addr; bit val; } exp_t;
  exp_t expq[$];

  function automatic int unsigned oa(int unsigned g);
    return N_IN + g;
  endfunction

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < IO_SLOTS; k++) if (rd_valid[k]) begin
      checks++;
      if (expq.size() == 0) failures++;
      else begin
        automatic exp_t e = expq.pop_front();
        if (rd_addr[k] !== e.addr || rd_data[k] !== e.val) begin
          failures++;
          if (failures < 10) $display("[%0d slots] bit %0d read %b expected %b", SLOTS, e.addr, rd_data[k], e.val);
        end
      end
    end
  end

  initial begin
    word_t w;
    int t0;
    done = 0; checks = 0; failures = 0; pred_words = 0;
    instr = '0; io = '0;
    for (int i = 0; i < 4096; i++) word_of[i] = -1000;
    for (int c = 0; c < N_CLS; c++) begin
      for (int j = 0; j < 36; j++) cfg[c*36 + j] = rand_cfg(0, N_IN);
      for (int j = 0; j < 6; j++) begin
        automatic int unsigned g = L0 + c*6 + j;
        cfg[g].lut = {$urandom(), $urandom()};
        for (int i = 0; i < LUT_K; i++) cfg[g].sel[i] = 12'(oa(c*36 + j*6 + i));
      end
      cfg[L0 + L1 + c].lut = {$urandom(), $urandom()};
      for (int i = 0; i < LUT_K; i++) cfg[L0 + L1 + c].sel[i] = 12'(oa(L0 + c*6 + i));
    end
    #12 rst_n = 1;
    for (int g = 0; g < N_LUT; g += 2) begin
      w = hdr(OP_DM_STORE, 2);
      w = set_dm_store(w, 0, g % SLOTS, g / SLOTS, cfg[g]);
      w = set_dm_store(w, 1, (g+1) % SLOTS, (g+1) / SLOTS, cfg[g+1]);
      @(negedge clk) instr = w;
    end
    for (int a = 0; a < N_IN; a += IO_SLOTS) begin
      w = hdr(OP_IO_STORE, IO_SLOTS);
      for (int k = 0; k < IO_SLOTS; k++) begin
        io[a+k] = 1'($urandom());
        w = set_io_store(w, k, a+k, io[a+k]);
      end
      @(negedge clk) instr = w;
    end
    repeat (3) @(negedge clk) instr = '0;
    for (int g = 0; g < N_LUT; g++) io[oa(g)] = eval_lut(cfg[g], io);
    // Predict phase.
    @(negedge clk);
    t0 = cyc;
    for (int g = 0; g < N_LUT; g += SLOTS) begin
      automatic int unsigned n = (N_LUT - g < SLOTS) ? N_LUT - g : SLOTS;
      w = hdr(OP_PREDICT, n);
      for (int k = 0; k < n; k++) begin
        w = set_predict(w, k, (g+k) / SLOTS, oa(g+k));
        for (int i = 0; i < LUT_K; i++) begin
          checks++;
          if (pred_words - word_of[cfg[g+k].sel[i]] < 3) begin
            failures++;
            $display("[%0d slots] neuron %0d issued too soon after its input", SLOTS, g+k);
          end
        end
        word_of[oa(g+k)] = pred_words;
      end
      instr = w;
      pred_words++;
      @(negedge clk);
    end
    checks++;
    if (cyc - t0 != (N_LUT + SLOTS - 1) / SLOTS) begin
      failures++;
      $display("[%0d slots] predict phase %0d cycles", SLOTS, cyc - t0);
    end
    instr = '0;
    repeat (2) @(negedge clk);
    for (int b = N_IN; b < N_IN + N_LUT; b += IO_SLOTS) begin
      w = hdr(OP_IO_READ, IO_SLOTS);
      for (int k = 0; k < IO_SLOTS; k++) begin
        automatic int unsigned a = (b + k < N_IN + N_LUT) ? b + k : N_IN;
        w = set_io_read(w, k, a);
        expq.push_back('{12'(a), io[a]});
      end
      instr = w;
      @(negedge clk);
    end
    instr = '0;
    repeat (8) @(negedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("[%0d slots] %0d neurons in %0d predict words", SLOTS, N_LUT, pred_words);
    done = 1;
  end
endmodule
