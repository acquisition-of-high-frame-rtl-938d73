// tb_lvds_deser2: self-checking test of the two-channel serial-to-parallel
// converter.  Random 8-bit samples are sent MSB first, one bit per DCO cycle,
// on two channels; FCO rises with each first bit.  The testbench makes its own
// detector enable (the cycle after FCO is first sampled high) and checks that
// both parallel outputs then hold the previous complete sample.
module tb_lvds_deser2;
  logic clk = 0;
  logic [1:0] sdata = '0;
  logic [7:0] par_a, par_b;
  logic fco = 0, fco_q = 0, det = 0;
  int checks = 0, failures = 0;
  logic [7:0] hist_a [$], hist_b [$];

  lvds_deser2 #(.SAMPLE_BITS(8)) dut (.clk(clk), .sdata(sdata), .par_a(par_a), .par_b(par_b));

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (det && hist_a.size() >= 2) begin
      checks++;
      if (par_a !== hist_a[hist_a.size()-2] || par_b !== hist_b[hist_b.size()-2]) begin
        failures++;
        $display("mismatch a=%h/%h b=%h/%h", par_a, hist_a[hist_a.size()-2], par_b, hist_b[hist_b.size()-2]);
      end
    end
    det   <= fco && !fco_q;
    fco_q <= fco;
  end

  initial begin
    logic [7:0] a, b;
    repeat (4) @(negedge clk);
    for (int s = 0; s < 500; s++) begin
      a = 8'($urandom); b = 8'($urandom);
      hist_a.push_back(a); hist_b.push_back(b);
      for (int i = 7; i >= 0; i--) begin
        sdata <= {b[i], a[i]};
        fco   <= (i >= 4);
        @(negedge clk);
      end
    end
    repeat (4) @(negedge clk);
    checks++;
    if (hist_a.size() != 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
