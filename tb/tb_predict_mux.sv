// tb_predict_mux: checks the 64-to-1 predict multiplexer against the
// truth-table definition, every index for many random tables.
module tb_predict_mux;
  import lutnn_pkg::*;

  logic [LUT_BITS-1:0] lut;
  logic [LUT_K-1:0]    idx;
  logic                out;
  int checks = 0, failures = 0;

  predict_mux dut (.lut_i(lut), .idx_i(idx), .out_o(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      lut = (t == 0) ? 64'h1 : {$urandom(), $urandom()};
      for (int a = 0; a < LUT_BITS; a++) begin
        idx = 6'(a);
        #1;
        checks++;
        if (out !== (((lut >> a) & 64'h1) != 0)) begin
          failures++;
          if (failures < 10) $display("mismatch lut=%h idx=%0d out=%b", lut, a, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
