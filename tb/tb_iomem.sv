// tb_iomem: random multi-port reads and writes of the IOMem bit register file
// against a reference array, including several ports writing one bit in the
// same cycle (highest port wins) and the all-zero reset state.
module tb_iomem;
  localparam int unsigned DEPTH = 4096, NRD = 6, NWR = 4, AW = 12;

  logic clk = 0, rst_n = 0;
  logic [NRD-1:0][AW-1:0] raddr;
  logic [NRD-1:0]         rdata;
  logic [NWR-1:0]         we;
  logic [NWR-1:0][AW-1:0] waddr;
  logic [NWR-1:0]         wdata;
  logic [DEPTH-1:0]       model;
  int checks = 0, failures = 0, conflicts = 0;

  iomem #(.DEPTH(DEPTH), .NRD(NRD), .NWR(NWR)) dut (
    .clk_i(clk), .rst_ni(rst_n), .raddr_i(raddr), .rdata_o(rdata),
    .we_i(we), .waddr_i(waddr), .wdata_i(wdata));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    #1;
    for (int p = 0; p < NRD; p++) begin
      checks++;
      if (rdata[p] !== model[raddr[p]]) begin
        failures++;
        if (failures < 10) $display("port %0d addr %0d got %b exp %b", p, raddr[p], rdata[p], model[raddr[p]]);
      end
    end
  endtask

  initial begin
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    model = '0;
    #12 rst_n = 1;
    // Reset state: sample the whole array.
    for (int a = 0; a < DEPTH; a += NRD) begin
      @(negedge clk);
      for (int p = 0; p < NRD; p++) raddr[p] = AW'((a + p) % DEPTH);
      check_reads();
    end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NWR; p++) begin
        we[p]    = ($urandom() % 3) != 0;
        // Small address window sometimes, to provoke same-bit conflicts.
        waddr[p] = (n % 4 == 0) ? AW'($urandom() % 4) : AW'($urandom());
        wdata[p] = 1'($urandom());
      end
      for (int p = 0; p < NRD; p++)
        raddr[p] = (p < NWR && $urandom() % 2) ? waddr[p] : AW'($urandom());
      // Reads are combinational: they show the state before this edge.
      check_reads();
      @(posedge clk);
      for (int p = 0; p < NWR; p++) if (we[p]) model[waddr[p]] = wdata[p];
      for (int p = 0; p < NWR; p++)
        for (int q = p + 1; q < NWR; q++)
          if (we[p] && we[q] && waddr[p] == waddr[q] && wdata[p] != wdata[q]) conflicts++;
    end
    checks++;
    if (conflicts == 0) begin
      failures++;
      $display("no write conflict was exercised");
    end
    $display("write conflicts exercised: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
