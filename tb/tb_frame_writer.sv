// tb_frame_writer: self-checking test of the write address/bank controller,
// with a short frame of 5 words.  Checks the write address sequence, the
// bank swap and frame-done toggle at the end of every frame, the reported
// done bank, that strobes are ignored while run is low, and that stopping in
// mid-frame restarts the next frame at address 0 in the same bank.
module tb_frame_writer;
  localparam int WPF = 5;
  logic clk = 0, rst = 1, run = 0, wr_stb = 0;
  logic we, wbank, done_bank, done_tgl;
  logic [9:0] waddr;
  int checks = 0, failures = 0;
  int exp_addr = 0, exp_bank = 0, exp_done_bank = 1, exp_tgl = 0, swaps = 0;

  frame_writer #(.WORDS_PER_FRAME(WPF), .DEPTH(1024)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // compare before each edge, then update the model
  always @(posedge clk) if (!rst) begin
    check("we", int'(we), int'(wr_stb && run));
    check("waddr", int'(waddr), exp_addr);
    check("wbank", int'(wbank), exp_bank);
    check("done_bank", int'(done_bank), exp_done_bank);
    check("done_tgl", int'(done_tgl), exp_tgl);
    if (!run) exp_addr = 0;
    else if (wr_stb) begin
      if (exp_addr == WPF - 1) begin
        exp_addr = 0; exp_done_bank = exp_bank; exp_bank ^= 1; exp_tgl ^= 1; swaps++;
      end else exp_addr++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (4) begin @(negedge clk) wr_stb <= 1; @(negedge clk) wr_stb <= 0; end  // run low
    run <= 1;
    for (int i = 0; i < 23; i++) begin
      @(negedge clk) wr_stb <= 1;
      @(negedge clk) wr_stb <= 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    run <= 0;                              // stop in mid-frame (23 = 4 frames + 3)
    repeat (3) @(negedge clk);
    run <= 1;
    repeat (WPF * 2) begin @(negedge clk) wr_stb <= 1; @(negedge clk) wr_stb <= 0; end
    repeat (2) @(negedge clk);
    check("frames", swaps, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
