// tb_rx_clock_gen: self-checking test of the sample/write strobe generator.
// Drives an FCO that rises every 8 DCO cycles (occasionally with a stretched
// period), toggles `run`, and checks that det_en pulses exactly once per FCO
// rising edge, one cycle after the edge is sampled, that wr_en marks every
// 8th enable counted from the start of run, and that nothing fires while run
// is low.
module tb_rx_clock_gen;
  logic clk = 0, rst = 1, run = 0, fco = 0;
  logic det_en, wr_en;
  int checks = 0, failures = 0;

  rx_clock_gen #(.DECIM(8)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic fco_prev = 0, exp_det = 0, exp_wr = 0;
  int   grp = 0, n_det = 0, n_wr = 0;
  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (det_en !== exp_det || wr_en !== exp_wr) begin
        failures++;
        $display("mismatch t=%0t det %b/%b wr %b/%b", $time, det_en, exp_det, wr_en, exp_wr);
      end
      n_det += det_en;
      n_wr  += wr_en;
    end
    exp_det = 0; exp_wr = 0;
    if (!rst && run && fco && !fco_prev) begin
      exp_det = 1;
      exp_wr  = (grp == 7);
      grp     = (grp + 1) % 8;
    end
    if (!run) grp = 0;
    fco_prev = rst ? 0 : fco;
  end

  task automatic fco_period(int len);
    fco <= 1; repeat (len / 2) @(negedge clk);
    fco <= 0; repeat (len - len / 2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (20) fco_period(8);           // run low: no strobes
    run = 1;
    repeat (100) fco_period(($urandom % 5 == 0) ? 10 : 8);
    run = 0;
    repeat (5) fco_period(8);
    run = 1;                              // restart: new group
    repeat (37) fco_period(8);
    @(negedge clk);
    checks++;
    if (n_det != 137 || n_wr != 16) begin
      failures++;
      $display("counts det=%0d wr=%0d", n_det, n_wr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
