// tb_packet_former: self-checking test of the packet formation logic.
//
// A behavioural model of the data banks answers the read port with one cycle
// of latency; its contents are a known function of (frame, bank, packet,
// address).  For every frame interrupt the testbench builds the expected
// packets byte by byte (Ethernet II, IPv4 and UDP headers with checksums
// computed here over the byte stream, application header, window data) and
// compares every word on the MAC bus.  It also checks:
//   - the header of the first packet against the frame captured from the
//     prototype (addresses, lengths 94/74, TTL 8, IP checksum 0xef2c);
//   - that each packet is 30 back-to-back words (2 start, 11 header, 16 data,
//     1 stop) and a frame of 8 packets ends within 8*47+4 cycles;
//   - the window moving every SUBFRAMES frames and wrapping after N_WINDOWS;
//   - a MAC configuration write, a dropped frame with sending disabled, a
//     change of IP addresses/ports, and the overrun flag.
module tb_packet_former;
  import us_eth_pkg::*;
  localparam int N_PKTS = 8, WIN_WORDS = 16, SUBFRAMES = 2, N_WINDOWS = 3;

  logic clk = 0, rst = 1;
  logic frame_tgl = 0, frame_bank = 0, send_en = 0;
  pkt_cfg_t cfg;
  logic mac_cfg_req = 0, mac_cfg_ack;
  logic [7:0] mac_cfg_addr = 8'h21;
  logic [31:0] mac_cfg_data = 32'hcafe_f00d;
  logic mac_reg_wr;
  logic [7:0] mac_reg_addr;
  logic [31:0] mac_reg_wdata;
  logic rd_bank;
  logic [2:0] rd_pkt;
  logic [9:0] rd_addr;
  logic [31:0] rd_data;
  logic [31:0] mac_data;
  logic mac_valid, mac_sof, mac_eof, overrun;
  logic [7:0] frames_sent, sub_idx;
  logic [4:0] win_idx;

  int checks = 0, failures = 0;

  packet_former #(.DEPTH(1024), .N_PKTS(N_PKTS), .WIN_WORDS(WIN_WORDS),
                  .SUBFRAMES(SUBFRAMES), .N_WINDOWS(N_WINDOWS)) dut (.*);

  always #20 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // ---------------- bank model ----------------
  int bank_frame [2];
  function automatic logic [31:0] bank_word(int f, int pkt, int addr);
    return 32'((f * 32'h9e3779b1) ^ (pkt * 32'h85ebca6b) ^ (addr * 32'h27d4eb2f) ^ 32'h7f80817e);
  endfunction
  always @(posedge clk) rd_data <= bank_word(bank_frame[rd_bank], int'(rd_pkt), int'(rd_addr));

  // ---------------- expected stream ----------------
  typedef struct { logic [31:0] w; bit sof; bit eof; } word_t;
  word_t exp_q [$];
  bit cmp_en = 1;

  function automatic logic [15:0] ones_sum(byte unsigned b [$]);
    logic [31:0] s = 0;
    if (b.size() % 2) b.push_back(0);
    for (int i = 0; i < b.size(); i += 2) s += {b[i], b[i+1]};
    while (s >> 16) s = (s & 32'hffff) + (s >> 16);
    return 16'(s);
  endfunction

  task automatic push_bytes(ref byte unsigned q [$], input logic [63:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(8'(v >> (8 * i)));
  endtask

  byte unsigned first_hdr [$];
  bit got_first_hdr = 0;

  task automatic expect_frame(int f, int win, int sub);
    byte unsigned pkt [$], ip [$], udp [$], pseudo [$], all [$];
    logic [15:0] cs;
    for (int n = 0; n < N_PKTS; n++) begin
      pkt = {}; ip = {}; udp = {}; pseudo = {}; all = {};
      // UDP: header (checksum 0 for now), app header, data
      push_bytes(udp, cfg.src_port, 2); push_bytes(udp, cfg.dst_port, 2);
      push_bytes(udp, 8 + 2 + 4 * WIN_WORDS, 2); push_bytes(udp, 0, 2);
      push_bytes(udp, {sub[7:0], win[4:0], n[2:0]}, 2);
      for (int i = 0; i < WIN_WORDS; i++) push_bytes(udp, bank_word(f, n, win * WIN_WORDS + i), 4);
      push_bytes(pseudo, cfg.src_ip, 4); push_bytes(pseudo, cfg.dst_ip, 4);
      push_bytes(pseudo, 17, 2); push_bytes(pseudo, udp.size(), 2);
      all = {pseudo, udp};
      cs = ~ones_sum(all);
      if (cs == 0) cs = 16'hffff;
      udp[6] = cs[15:8]; udp[7] = cs[7:0];
      // IPv4 header
      push_bytes(ip, 16'h4500, 2); push_bytes(ip, 20 + udp.size(), 2);
      push_bytes(ip, 32'h4000_0000, 4); push_bytes(ip, 16'h0811, 2); push_bytes(ip, 0, 2);
      push_bytes(ip, cfg.src_ip, 4); push_bytes(ip, cfg.dst_ip, 4);
      cs = ~ones_sum(ip);
      ip[10] = cs[15:8]; ip[11] = cs[7:0];
      // Ethernet II
      push_bytes(pkt, cfg.dst_mac, 6); push_bytes(pkt, cfg.src_mac, 6); push_bytes(pkt, 16'h0800, 2);
      pkt = {pkt, ip, udp};
      if (!got_first_hdr) begin first_hdr = pkt; got_first_hdr = 1; end
      exp_q.push_back('{cfg.mac_start0, 1, 0});
      exp_q.push_back('{cfg.mac_start1, 1, 0});
      for (int i = 0; i < pkt.size(); i += 4)
        exp_q.push_back('{{pkt[i], pkt[i+1], pkt[i+2], pkt[i+3]}, 0, 0});
      exp_q.push_back('{cfg.mac_stop, 0, 1});
    end
  endtask

  // ---------------- bus monitor ----------------
  int run_len = 0, n_pkts_seen = 0, n_words = 0;
  bit in_pkt = 0;
  always @(posedge clk) if (!rst) begin
    if (mac_valid) begin
      n_words++;
      if (mac_sof && !in_pkt) begin in_pkt = 1; run_len = 0; end
      run_len++;
      if (cmp_en) begin
        if (exp_q.size() == 0) check("unexpected word", 1, 0);
        else begin
          word_t e;
          e = exp_q.pop_front();
          check("mac word", {mac_sof, mac_eof, mac_data}, {e.sof, e.eof, e.w});
        end
      end
      if (mac_eof) begin
        check("packet length in words", run_len, 30);
        in_pkt = 0; n_pkts_seen++;
      end
    end else if (in_pkt) begin
      check("gap inside packet", 1, 0);
    end
  end

  // ---------------- stimulus ----------------
  int frame_no = 0, win_seen [int], wraps = 0;

  task automatic send_frame(int exp_win, int exp_sub, bit expect_pkts);
    int t0, pk0;
    bank_frame[frame_no % 2] = frame_no;
    if (expect_pkts) expect_frame(frame_no, exp_win, exp_sub);
    pk0 = n_pkts_seen;
    @(negedge clk);
    frame_bank = 1'(frame_no % 2);
    frame_tgl = !frame_tgl;
    t0 = 0;
    while (n_pkts_seen < pk0 + (expect_pkts ? N_PKTS : 0) && t0 < 1000) begin
      @(negedge clk); t0++;
    end
    if (expect_pkts) begin
      check("frame time bound", t0 <= N_PKTS * 47 + 4, 1);
      win_seen[exp_win] = 1;
    end else begin
      repeat (500) @(negedge clk);
      check("no packets when disabled", n_pkts_seen, pk0);
    end
    frame_no++;
  endtask

  initial begin
    int f_sent;
    cfg = '{dst_mac: 48'h001b_24e7_68c7, src_mac: 48'h001b_24e7_78c7,
            src_ip: 32'hc0a8_0103, dst_ip: 32'hc0a8_010f,
            src_port: 16'd104, dst_port: 16'd104,
            mac_start0: 32'd108, mac_start1: 32'h0, mac_stop: 32'h0};
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);

    // MAC configuration write
    mac_cfg_req = 1;
    fork
      begin
        int k = 0;
        while (!mac_cfg_ack && k < 20) begin @(posedge clk); #1 k++; end
      end
    join
    check("mac cfg write", {mac_reg_wr, mac_reg_addr, mac_reg_wdata}, {1'b1, 8'h21, 32'hcafe_f00d});
    @(negedge clk) mac_cfg_req = 0;
    @(negedge clk);
    check("mac cfg single write", mac_reg_wr, 0);

    send_en = 1;
    f_sent = 0;
    for (int i = 0; i < 8; i++) begin
      send_frame((f_sent / SUBFRAMES) % N_WINDOWS, f_sent % SUBFRAMES, 1);
      f_sent++;
    end
    // header of first packet against the captured frame
    begin
      byte unsigned cap [40] = '{8'h00,8'h1b,8'h24,8'he7,8'h68,8'hc7,8'h00,8'h1b,8'h24,8'he7,
                                 8'h78,8'hc7,8'h08,8'h00,8'h45,8'h00,8'h00,8'h5e,8'h40,8'h00,
                                 8'h00,8'h00,8'h08,8'h11,8'hef,8'h2c,8'hc0,8'ha8,8'h01,8'h03,
                                 8'hc0,8'ha8,8'h01,8'h0f,8'h00,8'h68,8'h00,8'h68,8'h00,8'h4a};
      for (int i = 0; i < 40; i++) check($sformatf("captured byte %0d", i), first_hdr[i], cap[i]);
      check("frame bytes", first_hdr.size(), 108);
    end
    check("all windows visited", win_seen.num(), N_WINDOWS);
    check("window wrapped", win_idx, 5'((8 / SUBFRAMES) % N_WINDOWS));

    // sending disabled: frame dropped, counters hold
    send_en = 0;
    send_frame(0, 0, 0);
    check("sub/win hold", {sub_idx, 3'b0, win_idx}, {8'(f_sent % SUBFRAMES), 3'b0, 5'((f_sent / SUBFRAMES) % N_WINDOWS)});
    send_en = 1;

    // new addresses and ports
    cfg.src_ip = 32'h0a01_0203; cfg.dst_ip = 32'hac10_fffe;
    cfg.src_port = 16'd4000; cfg.dst_port = 16'd104;
    cfg.mac_start0 = 32'h1234_5678; cfg.mac_stop = 32'h9abc_def0;
    send_frame((f_sent / SUBFRAMES) % N_WINDOWS, f_sent % SUBFRAMES, 1);
    f_sent++;
    check("frames sent", frames_sent, 8'(f_sent));
    check("no overrun yet", overrun, 0);
    check("expected queue drained", exp_q.size(), 0);

    // overrun: three interrupts back to back
    cmp_en = 0;
    repeat (3) begin @(negedge clk) frame_tgl = !frame_tgl; repeat (3) @(negedge clk); end
    repeat (10) @(negedge clk);
    check("overrun flagged", overrun, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
