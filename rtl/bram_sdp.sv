// bram_sdp: dual-clock block RAM, one write port and one read port.
//
// Models one FPGA block RAM of the data storage section (16 bits wide, 1024
// locations in the design).  The write port runs on the acquisition clock and
// the read port on the 25 MHz packet clock.  Reads are synchronous: `rdata`
// shows the word at the address presented on the previous rising edge of
// `rclk`, as in the FPGA primitive.  Contents are not initialised; a location
// is only read after the frame writer has filled it.
module bram_sdp #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk)
    if (we) mem[waddr] <= wdata;

  always_ff @(posedge rclk)
    rdata <= mem[raddr];

endmodule
