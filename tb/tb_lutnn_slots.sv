// tb_lutnn_slots: the 2580-neuron, 60-classifier network on processors with
// 2, 3, 4 and 21 predict slots. The predict phase must take 1290, 860, 645
// and 123 words: one word per SLOTS neurons, no stall cycles.
module tb_lutnn_slots;
  bit done [4];
  int c [4], f [4], wds [4];
  int checks = 0, failures = 0;
  localparam int EXP [4] = '{1290, 860, 645, 123};

  lutnn_net_runner #(.SLOTS(2))  r2  (.done(done[0]), .checks(c[0]), .failures(f[0]), .pred_words(wds[0]));
  lutnn_net_runner #(.SLOTS(3))  r3  (.done(done[1]), .checks(c[1]), .failures(f[1]), .pred_words(wds[1]));
  lutnn_net_runner #(.SLOTS(4))  r4  (.done(done[2]), .checks(c[2]), .failures(f[2]), .pred_words(wds[2]));
  lutnn_net_runner #(.SLOTS(21)) r21 (.done(done[3]), .checks(c[3]), .failures(f[3]), .pred_words(wds[3]));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < 4; i++) begin
      checks += c[i] + 1;
      failures += f[i];
      if (wds[i] != EXP[i]) begin
        failures++;
        $display("run %0d: %0d predict words, expected %0d", i, wds[i], EXP[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
