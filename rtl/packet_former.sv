// packet_former: packet formation logic of the receive FPGA.
//
// On every "next frame" interrupt (a toggle from the frame writer) the block
// reads the bank that was just filled and sends N_PKTS UDP/IPv4/Ethernet II
// packets to the Gigabit MAC device over a 32-bit bus.  Packet n (0-based)
// carries channels 4n+1 .. 4n+4, i.e. channel pairs 2n and 2n+1 of the data
// banks, which the top-level read mux presents as one 32-bit word per sample
// {ch 4n+1, ch 4n+2, ch 4n+3, ch 4n+4}.  Only one window of WIN_WORDS
// consecutive peaks per channel (16 bytes) is sent from each frame and the
// rest is discarded; the window stays the same for SUBFRAMES frames (a
// multi-frame, 256 frames) and then moves to the next one, cycling through
// N_WINDOWS windows.
//
// Each packet on the MAC bus is, one 32-bit word per clock:
//   2 start words (mac_sof)       - from registers, for the MAC device
//   11 header words               - Ethernet (14 B), IPv4 (20 B), UDP (8 B)
//                                   and a 2-byte application header
//   WIN_WORDS data words          - 64 bytes of samples
//   1 stop word (mac_eof)         - from a register
// Bytes go out most significant first.  With the defaults the frame is 108
// bytes long, the IP total length 94 and the UDP length 74, as in the frame
// captured from the prototype.  Before the start words the block reads the
// window once (WIN_WORDS + 1 cycles) to add up the UDP checksum, so that
// header checksums are complete when the header goes out; the IPv4 header
// checksum is computed from the fields.  The order start, Ethernet, IP, UDP,
// application header, RAM data, stop and the packet loop over channel groups
// follow the published design.  This design's own choices are: the application header
// layout {sub-frame[7:0], window[4:0], packet[2:0]}, the checksum pre-read,
// the valid/sof/eof bus signals and the single-write MAC configuration port.
//
// MAC configuration: while idle, a pending request from the register file is
// served first by one write cycle on mac_reg_* (acknowledged the same cycle);
// mac_reg_addr/mac_reg_wdata simply carry the register-file values, only the
// strobe is made here.
// A frame interrupt that arrives while the previous frame is still pending is
// lost and sets the sticky `overrun` flag.  When sending is disabled a
// pending frame is dropped and the window counters do not move.
//
// Read timing: rd_addr/rd_pkt/rd_bank are valid in one cycle and rd_data
// returns the word in the next (block RAM latency of one cycle).
module packet_former
  import us_eth_pkg::*;
#(
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned N_PKTS    = 8,
  parameter int unsigned WIN_WORDS = 16,
  parameter int unsigned SUBFRAMES = 256,
  parameter int unsigned N_WINDOWS = 23,
  localparam int unsigned AW       = $clog2(DEPTH),
  localparam int unsigned PW       = (N_PKTS > 1) ? $clog2(N_PKTS) : 1
) (
  input  logic          clk,          // 25 MHz packet clock
  input  logic          rst,
  // frame interrupt from the write side (already synchronised)
  input  logic          frame_tgl,
  input  logic          frame_bank,
  // control from the register file
  input  logic          send_en,
  input  pkt_cfg_t      cfg,
  input  logic          mac_cfg_req,
  input  logic [7:0]    mac_cfg_addr,
  input  logic [31:0]   mac_cfg_data,
  output logic          mac_cfg_ack,
  // MAC control-register port
  output logic          mac_reg_wr,
  output logic [7:0]    mac_reg_addr,
  output logic [31:0]   mac_reg_wdata,
  // data bank read port
  output logic          rd_bank,
  output logic [PW-1:0] rd_pkt,
  output logic [AW-1:0] rd_addr,
  input  logic [31:0]   rd_data,
  // 32-bit bus to the Gigabit MAC device
  output logic [31:0]   mac_data,
  output logic          mac_valid,
  output logic          mac_sof,
  output logic          mac_eof,
  // status
  output logic          overrun,
  output logic [7:0]    frames_sent,
  output logic [7:0]    sub_idx,
  output logic [4:0]    win_idx
);
  localparam int unsigned START_WORDS = 2;
  localparam int unsigned DATA_BYTES  = 4 * WIN_WORDS;
  localparam logic [15:0] UDP_LEN     = 16'(UDP_HDR_BYTES + APP_HDR_BYTES + DATA_BYTES);
  localparam logic [15:0] IP_LEN      = 16'(IP_HDR_BYTES) + UDP_LEN;

  initial assert (N_WINDOWS * WIN_WORDS <= DEPTH) else $error("windows exceed a bank");

  typedef enum logic [2:0] {S_IDLE, S_MACCFG, S_SUM, S_START, S_HDR, S_DATA, S_STOP} state_e;
  state_e state;

  logic [5:0]  cnt;
  logic        tgl_q, pending;
  logic [31:0] dsum;               // sum of the window's 16-bit data words
  logic [AW-1:0] base;
  logic [15:0] app_hdr, ip_csum, udp_csum;
  logic [31:0] ip_sum, udp_sum;
  logic [HDR_BYTES*8-1:0] hdr;
  logic        irq;

  assign irq  = (frame_tgl != tgl_q);
  assign base = AW'(win_idx) * AW'(WIN_WORDS);

  assign app_hdr = {sub_idx, win_idx, 3'(rd_pkt)};

  always_comb begin
    ip_sum = {16'd0, IP_VER_IHL, IP_TOS} + {16'd0, IP_LEN} + {16'd0, IP_IDENT}
           + {16'd0, IP_FLAGS_FRAG} + {16'd0, IP_TTL, IP_PROTO_UDP}
           + {16'd0, cfg.src_ip[31:16]} + {16'd0, cfg.src_ip[15:0]}
           + {16'd0, cfg.dst_ip[31:16]} + {16'd0, cfg.dst_ip[15:0]};
    ip_csum = ~csum_fold(ip_sum);

    udp_sum = {16'd0, cfg.src_ip[31:16]} + {16'd0, cfg.src_ip[15:0]}
            + {16'd0, cfg.dst_ip[31:16]} + {16'd0, cfg.dst_ip[15:0]}
            + {24'd0, IP_PROTO_UDP} + {16'd0, UDP_LEN}
            + {16'd0, cfg.src_port} + {16'd0, cfg.dst_port} + {16'd0, UDP_LEN}
            + {16'd0, app_hdr} + dsum;
    udp_csum = ~csum_fold(udp_sum);
    if (udp_csum == 16'h0000) udp_csum = 16'hffff;

    hdr = {cfg.dst_mac, cfg.src_mac, ETHERTYPE_IPV4,
           IP_VER_IHL, IP_TOS, IP_LEN, IP_IDENT, IP_FLAGS_FRAG,
           IP_TTL, IP_PROTO_UDP, ip_csum, cfg.src_ip, cfg.dst_ip,
           cfg.src_port, cfg.dst_port, UDP_LEN, udp_csum,
           app_hdr};
  end

  // Read address: the window during the checksum pass, one word ahead during data
  always_comb begin
    rd_addr = base;
    case (state)
      S_SUM:  rd_addr = base + AW'(cnt);
      S_DATA: rd_addr = base + AW'(cnt) + 1'b1;
      default: rd_addr = base;
    endcase
  end

  // MAC bus
  always_comb begin
    mac_data  = '0;
    mac_valid = 1'b0;
    mac_sof   = 1'b0;
    mac_eof   = 1'b0;
    case (state)
      S_START: begin
        mac_valid = 1'b1;
        mac_sof   = 1'b1;
        mac_data  = (cnt == 0) ? cfg.mac_start0 : cfg.mac_start1;
      end
      S_HDR: begin
        mac_valid = 1'b1;
        mac_data  = hdr[HDR_BYTES*8-1 - 32*cnt -: 32];
      end
      S_DATA: begin
        mac_valid = 1'b1;
        mac_data  = rd_data;
      end
      S_STOP: begin
        mac_valid = 1'b1;
        mac_eof   = 1'b1;
        mac_data  = cfg.mac_stop;
      end
      default: ;
    endcase
  end

  assign mac_reg_wr    = (state == S_MACCFG);
  assign mac_cfg_ack   = (state == S_MACCFG);
  assign mac_reg_addr  = mac_cfg_addr;
  assign mac_reg_wdata = mac_cfg_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      cnt         <= '0;
      tgl_q       <= frame_tgl;
      pending     <= 1'b0;
      overrun     <= 1'b0;
      dsum        <= '0;
      rd_bank     <= 1'b0;
      rd_pkt      <= '0;
      frames_sent <= '0;
      sub_idx     <= '0;
      win_idx     <= '0;
    end else begin
      tgl_q <= frame_tgl;
      if (irq) begin
        pending <= 1'b1;
        if (pending && !(state == S_IDLE && !mac_cfg_req)) overrun <= 1'b1;
      end

      case (state)
        S_IDLE: begin
          cnt  <= '0;
          dsum <= '0;
          if (mac_cfg_req) begin
            state <= S_MACCFG;
          end else if (pending) begin
            pending <= irq;
            if (send_en) begin
              rd_bank <= frame_bank;
              rd_pkt  <= '0;
              state   <= S_SUM;
            end
          end
        end
        S_MACCFG: state <= S_IDLE;
        S_SUM: begin
          if (cnt != 0)
            dsum <= dsum + {16'd0, rd_data[31:16]} + {16'd0, rd_data[15:0]};
          if (cnt == 6'(WIN_WORDS)) begin
            cnt   <= '0;
            state <= S_START;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_START: begin
          if (cnt == 6'(START_WORDS - 1)) begin
            cnt   <= '0;
            state <= S_HDR;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_HDR: begin
          if (cnt == 6'(HDR_WORDS - 1)) begin
            cnt   <= '0;
            state <= S_DATA;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DATA: begin
          if (cnt == 6'(WIN_WORDS - 1)) begin
            cnt   <= '0;
            state <= S_STOP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_STOP: begin
          dsum <= '0;
          if (rd_pkt == PW'(N_PKTS - 1)) begin
            state       <= S_IDLE;
            frames_sent <= frames_sent + 1'b1;
            if (sub_idx == 8'(SUBFRAMES - 1)) begin
              sub_idx <= '0;
              win_idx <= (win_idx == 5'(N_WINDOWS - 1)) ? '0 : win_idx + 1'b1;
            end else begin
              sub_idx <= sub_idx + 1'b1;
            end
          end else begin
            rd_pkt <= rd_pkt + 1'b1;
            state  <= S_SUM;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The MAC bus carries a frame of fixed length: sof for exactly the first two words
  property p_sof_then_hdr;
    @(posedge clk) disable iff (rst) (mac_sof && cnt == 6'(START_WORDS - 1)) |=> (mac_valid && !mac_sof);
  endproperty
  a_sof_then_hdr: assert property (p_sof_then_hdr);

endmodule
