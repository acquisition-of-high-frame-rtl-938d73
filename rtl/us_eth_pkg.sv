// us_eth_pkg: constants and types shared by the receive-FPGA blocks.
//
// Holds the fixed protocol fields of the UDP/IPv4/Ethernet II frame that
// carries the ultrasound data, the register map seen by the microcontroller
// and the bundle of programmable header fields that the register file hands
// to the packet former.  The fixed values follow the captured frame of the
// design (EtherType 0x0800, IPv4 header 45 00, identification 0x4000, TTL 8,
// protocol 17, UDP port 104 = ACR-NEMA/DICOM); the register map is this
// design's own choice.
package us_eth_pkg;

  // Fixed protocol fields
  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IP_VER_IHL     = 8'h45;
  localparam logic [7:0]  IP_TOS         = 8'h00;
  localparam logic [15:0] IP_IDENT       = 16'h4000;
  localparam logic [15:0] IP_FLAGS_FRAG  = 16'h0000;
  localparam logic [7:0]  IP_TTL         = 8'd8;
  localparam logic [7:0]  IP_PROTO_UDP   = 8'd17;
  localparam logic [15:0] UDP_PORT_DICOM = 16'd104;

  // Header sizes in bytes
  localparam int ETH_HDR_BYTES = 14;
  localparam int IP_HDR_BYTES  = 20;
  localparam int UDP_HDR_BYTES = 8;
  localparam int APP_HDR_BYTES = 2;
  localparam int HDR_BYTES     = ETH_HDR_BYTES + IP_HDR_BYTES + UDP_HDR_BYTES + APP_HDR_BYTES; // 44
  localparam int HDR_WORDS     = HDR_BYTES / 4;                                                 // 11

  // Register map of the microcontroller port (word addresses)
  typedef enum logic [3:0] {
    REG_CTRL        = 4'd0,   // [0] run, [1] send enable, [2] MAC config request (self-clearing)
    REG_DST_MAC_HI  = 4'd1,   // [15:0] destination MAC bytes 0..1
    REG_DST_MAC_LO  = 4'd2,   // destination MAC bytes 2..5
    REG_SRC_MAC_HI  = 4'd3,
    REG_SRC_MAC_LO  = 4'd4,
    REG_SRC_IP      = 4'd5,
    REG_DST_IP      = 4'd6,
    REG_UDP_PORTS   = 4'd7,   // {source port, destination port}
    REG_MAC_CFG_ADR = 4'd8,   // address of the MAC control register to write
    REG_MAC_CFG_DAT = 4'd9,   // value to write there
    REG_MAC_START0  = 4'd10,  // first start-of-frame word for the MAC device
    REG_MAC_START1  = 4'd11,  // second start-of-frame word
    REG_MAC_STOP    = 4'd12,  // end-of-frame word
    REG_STATUS      = 4'd13   // read only: [0] frame overrun (sticky), [15:8] frames sent
  } reg_addr_e;

  // Programmable frame fields handed from the register file to the packet former
  typedef struct packed {
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [31:0] mac_start0;
    logic [31:0] mac_start1;
    logic [31:0] mac_stop;
  } pkt_cfg_t;

  // One's-complement 16-bit fold of a 32-bit partial sum
  function automatic logic [15:0] csum_fold(input logic [31:0] s);
    logic [31:0] t;
    t = {16'd0, s[31:16]} + {16'd0, s[15:0]};
    t = {16'd0, t[31:16]} + {16'd0, t[15:0]};
    return t[15:0];
  endfunction

endpackage
