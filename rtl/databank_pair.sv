// databank_pair: the two data banks of one channel pair.
//
// Two block RAMs (Block RAM-1 and Block RAM-2) hold alternate frames: while
// the frame writer fills the bank selected by `wbank`, the packet former reads
// the other bank, chosen by `rbank`.  Each 16-bit word holds one peak of each
// of the two channels of the pair, first channel in bits [15:8].  The read
// data has the one-cycle latency of the block RAM; the bank select is delayed
// by one read-clock cycle to match.  Which bank is written is decided by the
// frame writer; this block only steers the write enable and the read mux.
module databank_pair #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic             wbank,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic             rbank,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] rdata0, rdata1;
  logic             rbank_q;

  bram_sdp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_bank0 (
    .wclk(wclk), .we(we && !wbank), .waddr(waddr), .wdata(wdata),
    .rclk(rclk), .raddr(raddr), .rdata(rdata0));

  bram_sdp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_bank1 (
    .wclk(wclk), .we(we && wbank), .waddr(waddr), .wdata(wdata),
    .rclk(rclk), .raddr(raddr), .rdata(rdata1));

  always_ff @(posedge rclk)
    rbank_q <= rbank;

  assign rdata = rbank_q ? rdata1 : rdata0;

endmodule
