// tb_instr_decode: builds random instruction words of every kind and checks
// each decoded per-slot operation against the word layout: active-field
// count, predict fields, routing of the two DM stores to the memories they
// name (store 1 wins when both name the same one), IOMem store and read fields.
module tb_instr_decode;
  import lutnn_pkg::*;
  import lutnn_tb_pkg::*;

  localparam int unsigned SLOTS = 8, IO_SLOTS = 8, DM_DEPTH = 2048;

  word_t instr;
  predict_op_t  [SLOTS-1:0]       pred;
  logic         [SLOTS-1:0]       dm_we;
  logic         [SLOTS-1:0][10:0] dm_waddr;
  lut_cfg_t     [SLOTS-1:0]       dm_wdata;
  io_store_op_t [IO_SLOTS-1:0]    ios;
  io_read_op_t  [IO_SLOTS-1:0]    ior;
  int checks = 0, failures = 0;

  instr_decode #(.SLOTS(SLOTS), .IO_SLOTS(IO_SLOTS), .DM_DEPTH(DM_DEPTH)) dut (
    .instr_i(instr), .pred_o(pred), .dm_we_o(dm_we), .dm_waddr_o(dm_waddr),
    .dm_wdata_o(dm_wdata), .io_store_o(ios), .io_read_o(ior));

  task automatic expect_eq(logic [199:0] got, logic [199:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      automatic opcode_t op = opcode_t'($urandom() % 5);
      automatic int unsigned cnt = $urandom() % (MAX_FIELDS + 1);
      int unsigned ln [MAX_FIELDS], oa [MAX_FIELDS];
      bit          vv [MAX_FIELDS];
      int unsigned dmn [2], dma [2];
      lut_cfg_t    dmc [2];
      instr = hdr(op, cnt);
      case (op)
        OP_PREDICT, OP_IO_STORE, OP_IO_READ, OP_NOP: begin
          for (int k = 0; k < MAX_FIELDS; k++) begin
            ln[k] = $urandom() % 4096; oa[k] = $urandom() % 4096; vv[k] = 1'($urandom());
            if (op == OP_PREDICT || op == OP_NOP) instr = set_predict(instr, k, ln[k], oa[k]);
            else if (op == OP_IO_STORE)           instr = set_io_store(instr, k, oa[k], vv[k]);
            else                                  instr = set_io_read(instr, k, oa[k]);
          end
        end
        default: begin  // OP_DM_STORE
          cnt = $urandom() % 3;
          instr = hdr(op, cnt);
          for (int j = 0; j < 2; j++) begin
            dmn[j] = (t % 5 == 0) ? 3 : $urandom() % 10;  // 8, 9 do not exist
            dma[j] = $urandom() % 2048;
            dmc[j] = rand_cfg(0, 4096);
            instr = set_dm_store(instr, j, dmn[j], dma[j], dmc[j]);
          end
        end
      endcase
      #1;
      for (int s = 0; s < SLOTS; s++) begin
        automatic bit pv = (op == OP_PREDICT) && s < cnt;
        expect_eq(200'(pred[s].valid), 200'(pv), "pred.valid");
        if (pv) begin
          expect_eq(200'(pred[s].lut_num), 200'(ln[s]), "pred.lut_num");
          expect_eq(200'(pred[s].out_addr), 200'(oa[s]), "pred.out_addr");
        end
        begin
          automatic int w = -1;
          if (op == OP_DM_STORE)
            for (int j = 0; j < 2; j++) if (j < cnt && dmn[j] == s) w = j;
          expect_eq(200'(dm_we[s]), 200'(w >= 0), "dm_we");
          if (w >= 0) begin
            expect_eq(200'(dm_waddr[s]), 200'(dma[w]), "dm_waddr");
            expect_eq(200'(dm_wdata[s]), 200'(dmc[w]), "dm_wdata");
          end
        end
      end
      for (int k = 0; k < IO_SLOTS; k++) begin
        automatic bit sv = (op == OP_IO_STORE) && k < cnt;
        automatic bit rv = (op == OP_IO_READ) && k < cnt;
        expect_eq(200'(ios[k].valid), 200'(sv), "ios.valid");
        expect_eq(200'(ior[k].valid), 200'(rv), "ior.valid");
        if (sv) expect_eq(200'({ios[k].addr, ios[k].value}), 200'({12'(oa[k]), vv[k]}), "ios fields");
        if (rv) expect_eq(200'(ior[k].addr), 200'(oa[k]), "ior.addr");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
