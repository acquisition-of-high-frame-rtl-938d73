// us_rx_tb_body.svh: body shared by the end-to-end testbenches of
// us_rx_fpga_top.  The including module defines the localparams N_CH, WPF,
// SUBFRAMES, N_WINDOWS, N_FRAMES and REQUIRE_ALL and instantiates the top as
// `dut` on the signals declared here.
//
// An ADC model sends, on every channel c, the 8-bit sample adc(c, s) MSB first,
// one bit per DCO cycle, with FCO high for the first four bits.  The
// receive chain first latches the word before sample 0 (all zeros), so the
// k-th sample seen by the peak detectors is 0 for k = 0 and adc(c, k-1)
// otherwise; the expected peak j of frame f is the maximum of samples
// (f*WPF + j)*8 .. +7.  Every packet on the MAC bus is parsed: start and
// stop words, Ethernet/IP/UDP fields, both checksums, the application header
// (sub-frame, window, packet number) and all 64 data bytes.  The testbench
// counts how often each mechanism happened: frames read from bank 0 and from
// bank 1, window moves and window wrap-around, packet number wrap, MAC
// configuration write, frames dropped while sending is disabled, and stop
// (no frames completed and no packets after run is cleared).

  localparam int WIN_WORDS = 16;
  localparam int N_PKTS = N_CH / 4;
  localparam int FRAME_DCO = WPF * 8 * 8;

  logic rst = 1, dco = 0, fco = 0, clk_rd = 0;
  logic [N_CH-1:0] adc_sdata = '0;
  logic uc_wr = 0;
  logic [3:0] uc_addr = '0;
  logic [31:0] uc_wdata = '0, uc_rdata;
  logic [31:0] mac_data, mac_reg_wdata;
  logic mac_valid, mac_sof, mac_eof, mac_reg_wr;
  logic [7:0] mac_reg_addr;

  int checks = 0, failures = 0;

  always #2.6 dco = !dco;      // 192 MHz bit clock: 8 bits x 24 MSPS
  always #20  clk_rd = !clk_rd; // 25 MHz packet clock

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // ---------------- ADC model ----------------
  function automatic logic [7:0] adc(int c, int s);
    logic [31:0] h;
    h = 32'(s) * 32'h9e3779b1 + 32'(c) * 32'h85ebca6b;
    h = h ^ (h >> 15);
    return h[7:0];
  endfunction

  function automatic logic [7:0] seen(int c, int k);
    return (k == 0) ? 8'h00 : adc(c, k - 1);
  endfunction

  function automatic logic [7:0] peak_exp(int c, int f, int j);
    logic [7:0] m = 0;
    for (int k = (f * WPF + j) * 8; k < (f * WPF + j) * 8 + 8; k++)
      if (seen(c, k) > m) m = seen(c, k);
    return m;
  endfunction

  bit stream_on = 0;
  initial begin
    wait (stream_on);
    for (int s = 0; ; s++) begin
      for (int i = 7; i >= 0; i--) begin
        @(negedge dco);
        fco = (i >= 4);
        for (int c = 0; c < N_CH; c++) adc_sdata[c] = adc(c, s)[i];
      end
    end
  end

  // ---------------- microcontroller ----------------
  task automatic uc_write(int a, logic [31:0] d);
    @(negedge clk_rd); uc_wr = 1; uc_addr = 4'(a); uc_wdata = d;
    @(negedge clk_rd); uc_wr = 0;
  endtask

  // ---------------- MAC bus monitor ----------------
  byte unsigned pkt [$];
  logic [31:0] start_w [$];
  int n_pkts = 0, n_frames = 0, n_cfg_wr = 0;
  int bank_used [2] = '{0, 0};
  int win_moves = 0, win_wraps = 0, pkt_wraps = 0, last_win = 0, last_n = -1;
  int run_len = 0;

  function automatic logic [15:0] ones_sum(byte unsigned b [$]);
    logic [31:0] s = 0;
    if (b.size() % 2) b.push_back(0);
    for (int i = 0; i < b.size(); i += 2) s += {b[i], b[i+1]};
    while (s >> 16) s = (s & 32'hffff) + (s >> 16);
    return 16'(s);
  endfunction

  task automatic check_packet();
    byte unsigned ip [$], ps [$], udp [$];
    int f, n, win, sub;
    logic [15:0] app;
    f = n_pkts / N_PKTS;
    check("packet bytes", pkt.size(), 108);
    if (pkt.size() != 108) return;
    check("start words", {start_w[0], start_w[1]}, {32'd108, 32'd0});
    check("dst mac", {pkt[0], pkt[1], pkt[2], pkt[3], pkt[4], pkt[5]}, 48'h001b24e768c7);
    check("src mac", {pkt[6], pkt[7], pkt[8], pkt[9], pkt[10], pkt[11]}, 48'h001b24e778c7);
    check("ethertype", {pkt[12], pkt[13]}, 16'h0800);
    ip = pkt[14:33];
    check("ip fixed", {ip[0], ip[1], ip[2], ip[3], ip[8], ip[9]}, 48'h4500005e0811);
    check("ip checksum", ones_sum(ip), 16'hffff);
    check("ip addrs", {ip[12], ip[13], ip[14], ip[15], ip[16], ip[17], ip[18], ip[19]}, 64'hc0a80103c0a8010f);
    udp = pkt[34:107];
    check("udp ports/len", {udp[0], udp[1], udp[2], udp[3], udp[4], udp[5]}, 48'h00680068004a);
    ps = {ip[12:19], 8'h00, 8'h11, 8'h00, 8'(udp.size())};
    check("udp checksum", ones_sum({ps, udp}), 16'hffff);
    app = {udp[8], udp[9]};
    sub = int'(app[15:8]); win = int'(app[7:3]); n = int'(app[2:0]);
    check("packet no", n, n_pkts % N_PKTS);
    check("sub-frame", sub, f % SUBFRAMES);
    check("window", win, (f / SUBFRAMES) % N_WINDOWS);
    for (int i = 0; i < WIN_WORDS; i++)
      for (int b = 0; b < 4; b++)
        check($sformatf("f%0d p%0d sample %0d ch %0d", f, n, i, 4 * n + b),
              udp[10 + 4 * i + b], peak_exp(4 * n + b, f, win * WIN_WORDS + i));
    if (n == 0 && last_n == N_PKTS - 1) pkt_wraps++;
    if (n == 0 && f > 0 && win != last_win) begin
      win_moves++;
      if (win == 0) win_wraps++;
    end
    if (n == 0) bank_used[dut.u_pkt.rd_bank]++;
    last_n = n; last_win = win;
    n_pkts++;
    if (n == N_PKTS - 1) n_frames++;
  endtask

  always @(posedge clk_rd) if (!rst) begin
    if (mac_reg_wr) begin
      n_cfg_wr++;
      check("mac cfg write", {mac_reg_addr, mac_reg_wdata}, {8'h05, 32'h0000_1000});
    end
    if (mac_valid) begin
      run_len++;
      if (mac_sof) start_w.push_back(mac_data);
      else if (mac_eof) begin
        check("packet words back to back", run_len, 30);
        check_packet();
        pkt = {}; start_w = {}; run_len = 0;
      end else
        for (int b = 3; b >= 0; b--) pkt.push_back(mac_data[8 * b +: 8]);
    end else if (run_len != 0) begin
      check("gap inside packet", 1, 0);
      run_len = 0;
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    #(1ns * (N_FRAMES + 6) * FRAME_DCO * 5.2 + 100us);
    failures++;
    $display("watchdog: %0d frames received", n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sequence ----------------
  initial begin
    int k, pk, tg, n_dropped;
    logic tg_q;
    repeat (20) @(negedge clk_rd);
    rst = 0;
    repeat (5) @(negedge clk_rd);
    uc_write(8, 32'h05);          // MAC control register address
    uc_write(9, 32'h1000);        // and value
    uc_write(0, 32'h4);           // request the MAC configuration write
    repeat (5) @(negedge clk_rd);
    uc_write(0, 32'h3);           // run + send to Ethernet
    repeat (10) @(negedge clk_rd);
    stream_on = 1;
    k = 0;
    while (n_frames < N_FRAMES && k < (N_FRAMES + 4) * FRAME_DCO / 7) begin
      @(negedge clk_rd); k++;
    end
    check("frames received", n_frames, N_FRAMES);
    // the packets of one frame take less than a frame time: no overrun
    uc_addr = 4'd13; #1;
    check("no overrun", uc_rdata[0], 0);
    // send disabled: frames are still completed but none is sent
    uc_write(0, 32'h1);
    repeat (FRAME_DCO / 7 + 10) @(negedge clk_rd);
    pk = n_pkts; tg = 0; tg_q = dut.done_tgl;
    repeat (2 * FRAME_DCO / 7) begin
      @(negedge clk_rd);
      if (dut.done_tgl != tg_q) begin tg++; tg_q = dut.done_tgl; end
    end
    check("frames completed while sending is off", tg > 0, 1);
    check("nothing sent while sending is off", n_pkts, pk);
    n_dropped = (n_pkts == pk && tg > 0) ? tg : 0;
    // stop: no more frames are completed
    uc_write(0, 32'h0);
    repeat (20) @(negedge clk_rd);
    tg = 0; tg_q = dut.done_tgl;
    repeat (2 * FRAME_DCO / 7) begin
      @(negedge clk_rd);
      if (dut.done_tgl != tg_q) begin tg++; tg_q = dut.done_tgl; end
    end
    check("no frames after stop", tg, 0);
    check("no packets after stop", n_pkts, pk);
    check("whole frames only", n_pkts % N_PKTS, 0);

    $display("mechanisms: frames=%0d bank0=%0d bank1=%0d window_moves=%0d window_wraps=%0d packet_wraps=%0d mac_cfg_writes=%0d dropped_while_send_off=%0d stop=%0d",
             n_frames, bank_used[0], bank_used[1], win_moves, win_wraps, pkt_wraps, n_cfg_wr, n_dropped, int'(tg == 0));
    check("mac configuration written", n_cfg_wr, 1);
    check("frames dropped with sending off", n_dropped > 0, 1);
    check("bank 0 used", bank_used[0] > 0, 1);
    check("bank 1 used", bank_used[1] > 0, 1);
    check("packet number wrapped", pkt_wraps > 0, 1);
    if (REQUIRE_ALL) begin
      check("window moved", win_moves > 0, 1);
      check("window wrapped", win_wraps > 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
