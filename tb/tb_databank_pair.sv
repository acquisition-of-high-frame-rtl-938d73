// tb_databank_pair: self-checking test of the ping-pong bank pair.  Writes
// different data into bank 0 and bank 1 at the same addresses, then reads
// both banks, and writes bank 0 again while bank 1 is being read, checking
// that each read returns its own bank's data and that writing one bank never
// disturbs the other.
module tb_databank_pair;
  logic wclk = 0, rclk = 0, we = 0, wbank = 0, rbank = 0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] ref0 [400], ref1 [400];
  int checks = 0, failures = 0;

  databank_pair #(.DEPTH(1024), .WIDTH(16)) dut (.*);

  always #3 wclk = !wclk;
  always #20 rclk = !rclk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_bank(bit b, int seed);
    logic [15:0] v;
    for (int i = 0; i < 400; i++) begin
      @(negedge wclk);
      v = 16'(i * 257 + seed * 4099);
      we <= 1; wbank <= b; waddr <= 10'(i); wdata <= v;
      if (b) ref1[i] = v; else ref0[i] = v;
    end
    @(negedge wclk) we <= 0;
  endtask

  task automatic read_bank(bit b, int n);
    for (int i = 0; i < n; i++) begin
      @(negedge rclk) begin rbank <= b; raddr <= 10'(i); end
      @(posedge rclk); #1;
      checks++;
      if (rdata !== (b ? ref1[i] : ref0[i])) begin
        failures++;
        $display("bank %0d addr %0d read %h expected %h", b, i, rdata, b ? ref1[i] : ref0[i]);
      end
    end
  endtask

  initial begin
    write_bank(0, 1);
    write_bank(1, 2);
    read_bank(0, 400);
    read_bank(1, 400);
    fork
      write_bank(0, 3);
      read_bank(1, 100);
    join
    read_bank(0, 400);
    read_bank(1, 400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
