// tb_lutnn_asip: end-to-end test of the LUT-neuron inference extension at its
// default size (8 predict slots, 4096-bit IOMem, 2048-entry data memories).
//
// Directed part: reset state, the 5-cycle predict and IOMem-store latency
// (a read issued 2 cycles after a write sees the old bit, 3 cycles after sees
// the new one), the 4-cycle read result timing, both DM stores of one word
// naming the same memory, and two slots writing the same IOMem bit.
//
// Network part: a network of 60 three-level classifiers, each made of 36
// first-level neurons reading the binary input features, 6 second-level
// neurons reading six first-level outputs each, and one third-level neuron
// (43 neurons per classifier, 2580 in all). Neuron g is stored in data memory
// g mod 8 at address g div 8. The program loads the configurations (two DM
// stores per word), loads 512 random input bits (8 IOMem stores per word),
// issues all predicts back to back in neuron order, and reads back every
// neuron output (8 per word). Every output is compared with a reference
// evaluation; the predict phase must take ceil(2580/8) = 323 words.
module tb_lutnn_asip;
  import lutnn_pkg::*;
  import lutnn_tb_pkg::*;

  localparam int unsigned SLOTS = 8, IO_SLOTS = 8;
  localparam int unsigned N_IN = 512, N_CLS = 60;
  localparam int unsigned L0 = 36 * N_CLS, L1 = 6 * N_CLS, L2 = N_CLS;
  localparam int unsigned N_LUT = L0 + L1 + L2;  // 2580

  logic clk = 0, rst_n = 0;
  word_t instr;
  logic [IO_SLOTS-1:0] rd_valid, rd_data;
  io_addr_t [IO_SLOTS-1:0] rd_addr;

  lutnn_asip dut (
    .clk_i(clk), .rst_ni(rst_n), .instr_i(instr),
    .rd_valid_o(rd_valid), .rd_addr_o(rd_addr), .rd_data_o(rd_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Mechanism counters.
  int n_dm_dual = 0, n_io_store_full = 0, n_pred_full = 0, n_pred_part = 0;
  int n_io_read = 0, n_latency = 0, n_dm_same = 0, n_wr_conflict = 0;

  logic [4095:0] io;        // reference IOMem
  lut_cfg_t      cfg [N_LUT];

  // Expected read results, in issue order.
  typedef struct { int cyc; io_addr_t addr; bit val; } exp_t;
  exp_t expq[$];

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  // Read monitor: results arrive 4 cycles after the word is presented.
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < IO_SLOTS; k++) if (rd_valid[k]) begin
      checks++;
      if (expq.size() == 0) fail("unexpected read result");
      else begin
        automatic exp_t e = expq.pop_front();
        if (cyc != e.cyc || rd_addr[k] !== e.addr || rd_data[k] !== e.val)
          fail($sformatf("read slot %0d: cyc %0d addr %0d bit %b, expected cyc %0d addr %0d bit %b",
                         k, cyc, rd_addr[k], rd_data[k], e.cyc, e.addr, e.val));
      end
    end
  end

  // Present one word for one cycle.
  task automatic issue(word_t w);
    @(negedge clk);
    instr = w;
  endtask

  task automatic nops(int n);
    repeat (n) issue('0);
  endtask

  // Read up to IO_SLOTS addresses; expected values given by the caller.
  task automatic read_bits(int unsigned addrs[$], bit vals[$]);
    word_t w = hdr(OP_IO_READ, addrs.size());
    for (int k = 0; k < addrs.size(); k++) w = set_io_read(w, k, addrs[k]);
    @(negedge clk);
    instr = w;
    for (int k = 0; k < addrs.size(); k++) expq.push_back('{cyc + 4, 12'(addrs[k]), vals[k]});
    n_io_read++;
  endtask

  task automatic drain();
    nops(8);
    checks++;
    if (expq.size() != 0) begin
      fail($sformatf("%0d read results missing", expq.size()));
      expq.delete();
    end
  endtask

  // ------------------------------------------------------------------
  task automatic directed();
    word_t w;
    lut_cfg_t ones, zeros;
    ones = rand_cfg(0, 4096);  ones.lut = '1;
    zeros = rand_cfg(0, 4096); zeros.lut = '0;

    // Reset: IOMem reads back zero.
    for (int a = 0; a < 64; a += 8) read_bits('{a, a+1, a+2, a+3, a+4, a+5, a+6, a+7},
                                             '{0, 0, 0, 0, 0, 0, 0, 0});
    drain();

    // DM stores: slot 0 addr 2047 = all-ones table, slot 1 addr 2047 = all-zeros.
    // A word whose two stores both name DM 2: store 1 must win.
    w = hdr(OP_DM_STORE, 2);
    w = set_dm_store(w, 0, 0, 2047, ones);
    w = set_dm_store(w, 1, 1, 2047, zeros);
    issue(w); n_dm_dual++;
    w = hdr(OP_DM_STORE, 2);
    w = set_dm_store(w, 0, 2, 5, zeros);
    w = set_dm_store(w, 1, 2, 5, ones);
    issue(w); n_dm_same++;

    // Predict latency: slot 0 writes 1 to bit 4000 (was 0) at cycle t.
    w = set_predict(hdr(OP_PREDICT, 1), 0, 2047, 4000);
    issue(w);
    read_bits('{4000}, '{0});  // t+1
    read_bits('{4000}, '{0});  // t+2: still old
    read_bits('{4000}, '{1});  // t+3: new value
    io[4000] = 1;
    n_latency++;
    drain();

    // Slot 2 address 5 must hold the all-ones table (store 1 won): predict to bit 4001.
    w = set_predict(hdr(OP_PREDICT, 3), 0, 2047, 4002);
    w = set_predict(w, 1, 2047, 4003);
    w = set_predict(w, 2, 5, 4001);
    issue(w);
    nops(2);
    read_bits('{4001, 4002, 4003}, '{1, 1, 0});
    io[4001] = 1; io[4002] = 1;
    drain();

    // Two slots write one bit in one cycle: the higher slot (1, zeros) wins.
    w = set_predict(hdr(OP_PREDICT, 2), 0, 2047, 4002);
    w = set_predict(w, 1, 2047, 4002);
    issue(w); n_wr_conflict++;
    nops(2);
    read_bits('{4002}, '{0});
    io[4002] = 0;
    drain();

    // IOMem store latency: store 1 to bit 4010 at t; read at t+2 old, t+3 new.
    w = set_io_store(hdr(OP_IO_STORE, 1), 0, 4010, 1);
    issue(w);
    nops(1);
    read_bits('{4010}, '{0});
    read_bits('{4010}, '{1});
    io[4010] = 1;
    n_latency++;
    drain();
  endtask

  // ------------------------------------------------------------------
  function automatic int unsigned out_addr(int unsigned g);
    return N_IN + g;
  endfunction

  task automatic network();
    word_t w;
    int t0, npred;
    // Build the network and its reference outputs.
    for (int c = 0; c < N_CLS; c++) begin
      for (int j = 0; j < 36; j++) cfg[c*36 + j] = rand_cfg(0, N_IN);
      for (int j = 0; j < 6; j++) begin
        automatic int unsigned g = L0 + c*6 + j;
        cfg[g].lut = {$urandom(), $urandom()};
        for (int i = 0; i < LUT_K; i++) cfg[g].sel[i] = 12'(out_addr(c*36 + j*6 + i));
      end
      begin
        automatic int unsigned g = L0 + L1 + c;
        cfg[g].lut = {$urandom(), $urandom()};
        for (int i = 0; i < LUT_K; i++) cfg[g].sel[i] = 12'(out_addr(L0 + c*6 + i));
      end
    end
    // Load the configurations, two per word.
    for (int g = 0; g < N_LUT; g += 2) begin
      w = hdr(OP_DM_STORE, 2);
      w = set_dm_store(w, 0, g % SLOTS, g / SLOTS, cfg[g]);
      w = set_dm_store(w, 1, (g+1) % SLOTS, (g+1) / SLOTS, cfg[g+1]);
      issue(w); n_dm_dual++;
    end
    // Load the input features, eight per word.
    for (int a = 0; a < N_IN; a += IO_SLOTS) begin
      w = hdr(OP_IO_STORE, IO_SLOTS);
      for (int k = 0; k < IO_SLOTS; k++) begin
        io[a+k] = 1'($urandom());
        w = set_io_store(w, k, a+k, io[a+k]);
      end
      issue(w); n_io_store_full++;
    end
    nops(3);
    // Reference evaluation in program order.
    for (int g = 0; g < N_LUT; g++) io[out_addr(g)] = eval_lut(cfg[g], io);
    // Predicts: neuron order, SLOTS per word; a level boundary closes a word.
    t0 = cyc; npred = 0;
    for (int g = 0; g < N_LUT; ) begin
      automatic int unsigned lvl_end = (g < L0) ? L0 : (g < L0 + L1) ? L0 + L1 : N_LUT;
      automatic int unsigned n = (lvl_end - g < SLOTS) ? lvl_end - g : SLOTS;
      w = hdr(OP_PREDICT, n);
      for (int k = 0; k < n; k++) w = set_predict(w, k, (g+k) / SLOTS, out_addr(g+k));
      issue(w); npred++;
      if (n == SLOTS) n_pred_full++; else n_pred_part++;
      g += n;
    end
    checks++;
    if (npred != 323 || cyc - t0 != 323)
      fail($sformatf("predict phase took %0d words / %0d cycles, expected 323", npred, cyc - t0));
    $display("predict phase: %0d words for %0d neurons on %0d slots", npred, N_LUT, SLOTS);
    // Final outputs, read 3 cycles after the last predict: they must be ready.
    nops(2);
    for (int c = 0; c < N_CLS; c += IO_SLOTS) begin
      automatic int unsigned a[$];
      automatic bit v[$];
      for (int k = 0; k < IO_SLOTS && c + k < N_CLS; k++) begin
        a.push_back(out_addr(L0 + L1 + c + k));
        v.push_back(io[out_addr(L0 + L1 + c + k)]);
      end
      read_bits(a, v);
    end
    // Every neuron output and every input bit.
    for (int b = 0; b < N_IN + N_LUT; b += IO_SLOTS) begin
      automatic int unsigned a[$];
      automatic bit v[$];
      for (int k = 0; k < IO_SLOTS && b + k < N_IN + N_LUT; k++) begin
        a.push_back(b + k);
        v.push_back(io[b + k]);
      end
      read_bits(a, v);
    end
    drain();
  endtask

  initial begin
    instr = '0;
    io = '0;
    #12 rst_n = 1;
    directed();
    network();
    $display("mechanisms: dual DM store %0d, same-DM DM store %0d, full IOMem store %0d,",
             n_dm_dual, n_dm_same, n_io_store_full);
    $display("  full predict %0d, partial predict %0d, IOMem read %0d, latency %0d, write conflict %0d",
             n_pred_full, n_pred_part, n_io_read, n_latency, n_wr_conflict);
    checks++; if (n_dm_dual == 0)       fail("dual DM store never happened");
    checks++; if (n_dm_same == 0)       fail("same-DM store never happened");
    checks++; if (n_io_store_full == 0) fail("full IOMem store never happened");
    checks++; if (n_pred_full == 0)     fail("full-width predict never happened");
    checks++; if (n_pred_part == 0)     fail("partial predict never happened");
    checks++; if (n_io_read == 0)       fail("IOMem read never happened");
    checks++; if (n_latency == 0)       fail("latency never checked");
    checks++; if (n_wr_conflict == 0)   fail("write conflict never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
