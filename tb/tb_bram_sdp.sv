// tb_bram_sdp: self-checking test of the dual-clock block RAM.  Fills all
// 1024 locations from a 7 ns write clock, reads them back in scrambled order
// from a 40 ns read clock, and checks data and the one-cycle read latency.
module tb_bram_sdp;
  logic wclk = 0, rclk = 0, we = 0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] ref_mem [1024];
  int checks = 0, failures = 0;

  bram_sdp #(.DEPTH(1024), .WIDTH(16)) dut (.*);

  always #3.5 wclk = !wclk;
  always #20  rclk = !rclk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] a;
    logic [15:0] v;
    for (int i = 0; i < 1024; i++) begin
      @(negedge wclk);
      v = 16'($urandom);
      we <= 1; waddr <= 10'(i); wdata <= v;
      ref_mem[i] = v;
    end
    @(negedge wclk) we <= 0;
    // overwrite a few locations
    for (int i = 0; i < 16; i++) begin
      @(negedge wclk);
      we <= 1; waddr <= 10'(i * 61); wdata <= 16'hA500 + 16'(i);
      ref_mem[i * 61] = 16'hA500 + 16'(i);
    end
    @(negedge wclk) we <= 0;
    for (int i = 0; i < 1024; i++) begin
      a = 10'((i * 37 + 5) % 1024);
      @(negedge rclk) raddr <= a;
      @(posedge rclk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("addr %0d read %h expected %h", a, rdata, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
