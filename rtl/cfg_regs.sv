// cfg_regs: register file loaded by the microcontroller.
//
// The microcontroller, itself programmed from the laptop over USB, writes the
// FPGA registers that start and stop the acquisition, enable sending to
// Ethernet, request a configuration write to the Gigabit MAC, and hold the
// variable overhead fields of each frame: MAC addresses, IP addresses and UDP
// ports, plus the start and stop words for the MAC device.  Fixed overhead
// fields live in us_eth_pkg.  The reset values reproduce the frame captured
// with the prototype (00:1b:24:e7:78:c7 -> 00:1b:24:e7:68:c7, 192.168.1.3 ->
// 192.168.1.15, port 104 both ways); the register map, the write-strobe
// microcontroller bus and the reset values of the MAC start/stop words
// (start0 = frame length in bytes, start1 = 0, stop = 0) are this design's
// choices, since the published description does not give them.
//
// Interface: a write happens on a rising edge with `uc_wr` high; `uc_rdata`
// is a combinational read-back of the register at `uc_addr`.  Bit 2 of CTRL
// sets the MAC configuration request, which stays set until the packet former
// acknowledges it with `mac_cfg_ack`.  All in the packet (read) clock domain.
module cfg_regs
  import us_eth_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // microcontroller port
  input  logic        uc_wr,
  input  logic [3:0]  uc_addr,
  input  logic [31:0] uc_wdata,
  output logic [31:0] uc_rdata,
  // to the rest of the FPGA
  output logic        run,
  output logic        send_en,
  output logic        mac_cfg_req,
  input  logic        mac_cfg_ack,
  output logic [7:0]  mac_cfg_addr,
  output logic [31:0] mac_cfg_data,
  output pkt_cfg_t    cfg,
  // status
  input  logic        overrun,
  input  logic [7:0]  frames_sent
);
  localparam pkt_cfg_t CFG_RESET = '{
    dst_mac:    48'h001b_24e7_68c7,
    src_mac:    48'h001b_24e7_78c7,
    src_ip:     32'hc0a8_0103,
    dst_ip:     32'hc0a8_010f,
    src_port:   UDP_PORT_DICOM,
    dst_port:   UDP_PORT_DICOM,
    mac_start0: 32'(HDR_BYTES + 64),
    mac_start1: 32'h0000_0000,
    mac_stop:   32'h0000_0000
  };

  always_ff @(posedge clk) begin
    if (rst) begin
      run          <= 1'b0;
      send_en      <= 1'b0;
      mac_cfg_req  <= 1'b0;
      mac_cfg_addr <= '0;
      mac_cfg_data <= '0;
      cfg          <= CFG_RESET;
    end else begin
      if (mac_cfg_ack)
        mac_cfg_req <= 1'b0;
      if (uc_wr) begin
        case (reg_addr_e'(uc_addr))
          REG_CTRL: begin
            run     <= uc_wdata[0];
            send_en <= uc_wdata[1];
            if (uc_wdata[2]) mac_cfg_req <= 1'b1;
          end
          REG_DST_MAC_HI:  cfg.dst_mac[47:32] <= uc_wdata[15:0];
          REG_DST_MAC_LO:  cfg.dst_mac[31:0]  <= uc_wdata;
          REG_SRC_MAC_HI:  cfg.src_mac[47:32] <= uc_wdata[15:0];
          REG_SRC_MAC_LO:  cfg.src_mac[31:0]  <= uc_wdata;
          REG_SRC_IP:      cfg.src_ip         <= uc_wdata;
          REG_DST_IP:      cfg.dst_ip         <= uc_wdata;
          REG_UDP_PORTS:   {cfg.src_port, cfg.dst_port} <= uc_wdata;
          REG_MAC_CFG_ADR: mac_cfg_addr       <= uc_wdata[7:0];
          REG_MAC_CFG_DAT: mac_cfg_data       <= uc_wdata;
          REG_MAC_START0:  cfg.mac_start0     <= uc_wdata;
          REG_MAC_START1:  cfg.mac_start1     <= uc_wdata;
          REG_MAC_STOP:    cfg.mac_stop       <= uc_wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    uc_rdata = '0;
    case (reg_addr_e'(uc_addr))
      REG_CTRL:        uc_rdata = {29'd0, mac_cfg_req, send_en, run};
      REG_DST_MAC_HI:  uc_rdata = {16'd0, cfg.dst_mac[47:32]};
      REG_DST_MAC_LO:  uc_rdata = cfg.dst_mac[31:0];
      REG_SRC_MAC_HI:  uc_rdata = {16'd0, cfg.src_mac[47:32]};
      REG_SRC_MAC_LO:  uc_rdata = cfg.src_mac[31:0];
      REG_SRC_IP:      uc_rdata = cfg.src_ip;
      REG_DST_IP:      uc_rdata = cfg.dst_ip;
      REG_UDP_PORTS:   uc_rdata = {cfg.src_port, cfg.dst_port};
      REG_MAC_CFG_ADR: uc_rdata = {24'd0, mac_cfg_addr};
      REG_MAC_CFG_DAT: uc_rdata = mac_cfg_data;
      REG_MAC_START0:  uc_rdata = cfg.mac_start0;
      REG_MAC_START1:  uc_rdata = cfg.mac_start1;
      REG_MAC_STOP:    uc_rdata = cfg.mac_stop;
      REG_STATUS:      uc_rdata = {16'd0, frames_sent, 7'd0, overrun};
      default:         uc_rdata = '0;
    endcase
  end

endmodule
