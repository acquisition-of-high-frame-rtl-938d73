// tb_peak_detect: self-checking test of the 8-sample peak detector.  Random
// samples arrive with random gaps between enables; every 8th is marked last.
// Each output must equal the maximum of its 8 samples, appear one cycle after
// the last sample, and appear once per group.
module tb_peak_detect;
  logic clk = 0, rst = 1, en = 0, last = 0;
  logic [7:0] din = '0, peak;
  logic peak_valid;
  int checks = 0, failures = 0, n_out = 0;
  logic [7:0] exp_q [$];
  logic pend = 0;

  peak_detect #(.SAMPLE_BITS(8)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (peak_valid !== pend) begin
        failures++;
        $display("valid timing wrong t=%0t", $time);
      end
      if (peak_valid) begin
        n_out++;
        checks++;
        if (peak !== exp_q[0]) begin
          failures++;
          $display("peak %h expected %h", peak, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end
    pend <= en && last && !rst;
  end

  initial begin
    logic [7:0] mx, v;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int g = 0; g < 300; g++) begin
      mx = 0;
      for (int i = 0; i < 8; i++) begin
        // force a few special groups: all equal, peak first, peak last
        v = (g % 10 == 0) ? 8'h80 : 8'($urandom);
        if (g % 10 == 1 && i == 0) v = 8'hff;
        if (g % 10 == 2) v = 8'(i * 3);
        if (v > mx) mx = v;
        if (i == 7) exp_q.push_back(mx);
        en = 1'b1; last = (i == 7); din = v;
        @(negedge clk);
        en = 1'b0; last = 1'b0;
        repeat ($urandom % 3) @(negedge clk);
      end
    end
    repeat (3) @(negedge clk);
    checks++;
    if (n_out != 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
