// tb_cfg_regs: self-checking test of the microcontroller register file.
// Checks the reset values (the addresses and ports of the captured frame),
// writes and reads back every register, the control bits, the sticky MAC
// configuration request and its acknowledge, and the status read-back.
module tb_cfg_regs;
  import us_eth_pkg::*;
  logic clk = 0, rst = 1, uc_wr = 0;
  logic [3:0] uc_addr = '0;
  logic [31:0] uc_wdata = '0, uc_rdata;
  logic run, send_en, mac_cfg_req, mac_cfg_ack = 0;
  logic [7:0] mac_cfg_addr;
  logic [31:0] mac_cfg_data;
  pkt_cfg_t cfg;
  logic overrun = 0;
  logic [7:0] frames_sent = 8'h5a;
  int checks = 0, failures = 0;

  cfg_regs dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); uc_wr <= 1; uc_addr <= 4'(a); uc_wdata <= d;
    @(negedge clk); uc_wr <= 0;
  endtask

  // combinational read-back; called between clock edges
  logic [31:0] rdv;
  task automatic rd(int a);
    uc_addr = 4'(a);
    #1 rdv = uc_rdata;
  endtask

  initial begin
    logic [31:0] v;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check("rst dst_mac", cfg.dst_mac, 48'h001b24e768c7);
    check("rst src_mac", cfg.src_mac, 48'h001b24e778c7);
    check("rst src_ip",  cfg.src_ip, 32'hc0a80103);
    check("rst dst_ip",  cfg.dst_ip, 32'hc0a8010f);
    check("rst ports",   {cfg.src_port, cfg.dst_port}, {16'd104, 16'd104});
    check("rst run",     {run, send_en, mac_cfg_req}, 0);
    for (int a = 1; a <= 12; a++) begin
      v = $urandom;
      wr(a, v);
      if (a == 1 || a == 3) v &= 32'hffff;
      if (a == 8) v &= 32'hff;
      rd(a); check($sformatf("reg %0d", a), rdv, v);
    end
    wr(1, 32'h1111); wr(2, 32'h22223333);
    check("dst_mac", cfg.dst_mac, 48'h111122223333);
    wr(5, 32'h0a000001); check("src_ip", cfg.src_ip, 32'h0a000001);
    wr(7, 32'h12345678); check("ports", {cfg.src_port, cfg.dst_port}, 32'h12345678);
    wr(8, 32'h33); wr(9, 32'hdeadbeef);
    check("mac cfg", {mac_cfg_addr, mac_cfg_data}, {8'h33, 32'hdeadbeef});
    wr(0, 32'h3);
    check("run/send", {run, send_en, mac_cfg_req}, 3'b110);
    wr(0, 32'h7);
    check("cfg req", mac_cfg_req, 1);
    repeat (3) @(negedge clk);
    check("cfg req held", mac_cfg_req, 1);
    mac_cfg_ack <= 1; @(negedge clk); mac_cfg_ack <= 0;
    check("cfg req cleared", mac_cfg_req, 0);
    rd(0); check("ctrl read", rdv, 32'h3);
    overrun = 1;
    rd(13); check("status", rdv, 32'h00005a01);
    wr(0, 32'h0);
    check("stop", {run, send_en}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
