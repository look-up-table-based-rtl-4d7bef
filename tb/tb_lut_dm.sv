// tb_lut_dm: writes random LUT configurations into the data memory and reads
// them back, checking the one-cycle read latency, the read enable hold, and
// that a read and a write of the same address in one cycle return the old word.
module tb_lut_dm;
  import lutnn_pkg::*;

  localparam int unsigned DEPTH = 2048;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 0;
  logic re, we;
  logic [AW-1:0] raddr, waddr;
  lut_cfg_t rdata, wdata;
  lut_cfg_t model [DEPTH];
  bit       written [DEPTH];
  int checks = 0, failures = 0;

  lut_dm #(.DEPTH(DEPTH)) dut (
    .clk_i(clk), .re_i(re), .raddr_i(raddr), .rdata_o(rdata),
    .we_i(we), .waddr_i(waddr), .wdata_i(wdata));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(lut_cfg_t exp, string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, rdata, exp);
    end
  endtask

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = '0;
    // Fill every address (covers the whole depth).
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = rand_cfg_local();
      model[a] = wdata; written[a] = 1;
    end
    @(negedge clk); we = 0;
    // Random reads, one per cycle, data one cycle later.
    for (int n = 0; n < 3000; n++) begin
      int unsigned a = $urandom() % DEPTH;
      @(negedge clk);
      re = 1; raddr = AW'(a);
      @(negedge clk);
      check(model[a], "read");
      // Hold: with re low the output keeps the last word.
      re = 0; raddr = AW'($urandom());
      @(negedge clk);
      check(model[a], "hold");
    end
    // Read and write of the same address in one cycle: old word returned.
    for (int n = 0; n < 200; n++) begin
      int unsigned a = $urandom() % DEPTH;
      @(negedge clk);
      re = 1; raddr = AW'(a); we = 1; waddr = AW'(a); wdata = rand_cfg_local();
      @(negedge clk);
      check(model[a], "read-during-write");
      model[a] = wdata;
      we = 0;
      @(negedge clk);
      check(model[a], "after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic lut_cfg_t rand_cfg_local();
    lut_cfg_t c;
    c = {$urandom(), $urandom(), $urandom(), $urandom(), 8'($urandom())};
    return c;
  endfunction
endmodule
