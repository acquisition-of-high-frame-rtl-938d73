// us_rx_fpga_top: receive FPGA of a transient-elastography ultrasound scanner.
//
// Carries the echo data of N_CH receive channels from the serial LVDS outputs
// of the receiver ADCs to a Gigabit Ethernet MAC device as UDP packets that a
// laptop can take in without loss.  Per channel pair, a serial-to-parallel
// converter feeds two peak detectors that keep the peak of every 8 samples
// (24 MSPS -> 3 MS/s).  The peaks of all channels are written, one 16-bit word
// per channel pair, into ping-pong data banks: one frame (375 peaks per
// channel) goes into one bank while the packet formation logic reads the
// other.  At the end of each frame the write side interrupts the packet side,
// which sends 8 packets of 4 channels x 16 samples, i.e. one 16-sample window
// per channel out of each frame, moving the window every 256 frames.
//
// Clock domains:
//   dco     - ADC bit clock; deserialisers, peak detectors, frame writer and
//             the write ports of the banks.  FCO (frame clock) is sampled as
//             data in this domain to make the sample and write strobes.
//   clk_rd  - 25 MHz packet clock; register file, packet former, bank reads
//             and the MAC bus.
// The run bit crosses to `dco`, and the frame-done toggle with its bank number
// crosses to `clk_rd`, through two-flop synchronisers.  `rst` is synchronised
// into each domain.
//
// All receivers are assumed to share one DCO/FCO pair.  The LVDS input
// buffers, the analog receiver, the microcontroller and the MAC device are
// outside this module; their signals are its ports.
module us_rx_fpga_top
  import us_eth_pkg::*;
#(
  parameter int unsigned N_CH            = 32,
  parameter int unsigned DECIM           = 8,
  parameter int unsigned WORDS_PER_FRAME = 375,
  parameter int unsigned DEPTH           = 1024,
  parameter int unsigned WIN_WORDS       = 16,
  parameter int unsigned SUBFRAMES       = 256,
  parameter int unsigned N_WINDOWS       = 23,
  localparam int unsigned N_PAIRS        = N_CH / 2,
  localparam int unsigned N_PKTS         = N_CH / 4,
  localparam int unsigned AW             = $clog2(DEPTH),
  localparam int unsigned PW             = (N_PKTS > 1) ? $clog2(N_PKTS) : 1
) (
  input  logic            rst,
  // ADC receiver side (after the LVDS input buffers)
  input  logic            dco,
  input  logic            fco,
  input  logic [N_CH-1:0] adc_sdata,
  // packet clock
  input  logic            clk_rd,
  // microcontroller register port (clk_rd domain)
  input  logic            uc_wr,
  input  logic [3:0]      uc_addr,
  input  logic [31:0]     uc_wdata,
  output logic [31:0]     uc_rdata,
  // Gigabit MAC device: 32-bit data bus and control-register port
  output logic [31:0]     mac_data,
  output logic            mac_valid,
  output logic            mac_sof,
  output logic            mac_eof,
  output logic            mac_reg_wr,
  output logic [7:0]      mac_reg_addr,
  output logic [31:0]     mac_reg_wdata
);
  initial assert (N_CH % 4 == 0) else $error("N_CH must be a multiple of 4");

  // ---------------- resets and domain crossings ----------------
  logic rst_dco, rst_rd;
  sync2 #(.WIDTH(1)) u_rst_dco (.clk(dco),    .d(rst), .q(rst_dco));
  sync2 #(.WIDTH(1)) u_rst_rd  (.clk(clk_rd), .d(rst), .q(rst_rd));

  logic run_rd, run_dco;
  sync2 #(.WIDTH(1)) u_run_sync (.clk(dco), .d(run_rd), .q(run_dco));

  logic done_bank, done_tgl, done_bank_rd, done_tgl_rd;
  sync2 #(.WIDTH(2)) u_done_sync (.clk(clk_rd), .d({done_bank, done_tgl}),
                                  .q({done_bank_rd, done_tgl_rd}));

  // ---------------- acquisition (dco) domain ----------------
  logic det_en, wr_en;
  rx_clock_gen #(.DECIM(DECIM)) u_clkgen (
    .clk(dco), .rst(rst_dco), .run(run_dco), .fco(fco),
    .det_en(det_en), .wr_en(wr_en));

  logic          peak_rst;
  logic [7:0]    par  [N_CH];
  logic [7:0]    peak [N_CH];
  logic [N_CH-1:0] peak_valid;
  logic          we, wbank;
  logic [AW-1:0] waddr;
  logic [15:0]   pair_rdata [N_PAIRS];
  logic          rd_bank;
  logic [PW-1:0] rd_pkt;
  logic [AW-1:0] rd_addr;
  logic [31:0]   rd_data;

  assign peak_rst = rst_dco || !run_dco;

  for (genvar p = 0; p < N_PAIRS; p++) begin : g_pair
    lvds_deser2 #(.SAMPLE_BITS(8)) u_deser (
      .clk(dco), .sdata(adc_sdata[2*p +: 2]),
      .par_a(par[2*p]), .par_b(par[2*p+1]));

    for (genvar c = 0; c < 2; c++) begin : g_ch
      peak_detect #(.SAMPLE_BITS(8)) u_peak (
        .clk(dco), .rst(peak_rst), .en(det_en), .last(wr_en),
        .din(par[2*p+c]), .peak(peak[2*p+c]), .peak_valid(peak_valid[2*p+c]));
    end

    databank_pair #(.DEPTH(DEPTH), .WIDTH(16)) u_bank (
      .wclk(dco), .we(we), .wbank(wbank), .waddr(waddr),
      .wdata({peak[2*p], peak[2*p+1]}),
      .rclk(clk_rd), .rbank(rd_bank), .raddr(rd_addr), .rdata(pair_rdata[p]));
  end

  frame_writer #(.WORDS_PER_FRAME(WORDS_PER_FRAME), .DEPTH(DEPTH)) u_writer (
    .clk(dco), .rst(rst_dco), .run(run_dco), .wr_stb(peak_valid[0]),
    .we(we), .wbank(wbank), .waddr(waddr),
    .done_bank(done_bank), .done_tgl(done_tgl));

  // ---------------- packet (clk_rd) domain ----------------
  logic       send_en, mac_cfg_req, mac_cfg_ack, overrun;
  logic [7:0] mac_cfg_addr, frames_sent, sub_idx;
  logic [31:0] mac_cfg_data;
  logic [4:0] win_idx;
  pkt_cfg_t   cfg;

  cfg_regs u_regs (
    .clk(clk_rd), .rst(rst_rd),
    .uc_wr(uc_wr), .uc_addr(uc_addr), .uc_wdata(uc_wdata), .uc_rdata(uc_rdata),
    .run(run_rd), .send_en(send_en),
    .mac_cfg_req(mac_cfg_req), .mac_cfg_ack(mac_cfg_ack),
    .mac_cfg_addr(mac_cfg_addr), .mac_cfg_data(mac_cfg_data),
    .cfg(cfg), .overrun(overrun), .frames_sent(frames_sent));

  // Packet n reads channel pairs 2n and 2n+1: one 32-bit word per sample
  assign rd_data = {pair_rdata[2*rd_pkt], pair_rdata[2*rd_pkt+1]};

  packet_former #(
    .DEPTH(DEPTH), .N_PKTS(N_PKTS), .WIN_WORDS(WIN_WORDS),
    .SUBFRAMES(SUBFRAMES), .N_WINDOWS(N_WINDOWS)
  ) u_pkt (
    .clk(clk_rd), .rst(rst_rd),
    .frame_tgl(done_tgl_rd), .frame_bank(done_bank_rd),
    .send_en(send_en), .cfg(cfg),
    .mac_cfg_req(mac_cfg_req), .mac_cfg_addr(mac_cfg_addr), .mac_cfg_data(mac_cfg_data),
    .mac_cfg_ack(mac_cfg_ack),
    .mac_reg_wr(mac_reg_wr), .mac_reg_addr(mac_reg_addr), .mac_reg_wdata(mac_reg_wdata),
    .rd_bank(rd_bank), .rd_pkt(rd_pkt), .rd_addr(rd_addr), .rd_data(rd_data),
    .mac_data(mac_data), .mac_valid(mac_valid), .mac_sof(mac_sof), .mac_eof(mac_eof),
    .overrun(overrun), .frames_sent(frames_sent), .sub_idx(sub_idx), .win_idx(win_idx));

endmodule
