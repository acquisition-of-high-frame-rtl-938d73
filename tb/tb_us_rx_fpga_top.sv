// tb_us_rx_fpga_top: end-to-end test of the receive FPGA at reduced frame
// length (64 peaks per channel per frame instead of 375), a multi-frame of 2
// frames instead of 256 and 4 windows instead of 23, so that in 10 frames the
// window moves through all positions and wraps.  All 32 channels, the 8-fold
// peak detection, the 16-sample windows and the 108-byte packets are at their
// full size.  See us_rx_tb_body.svh for what is checked.
module tb_us_rx_fpga_top;
  localparam int N_CH = 32, WPF = 64, SUBFRAMES = 2, N_WINDOWS = 4, N_FRAMES = 10;
  localparam bit REQUIRE_ALL = 1;

  `include "us_rx_tb_body.svh"

  us_rx_fpga_top #(.N_CH(N_CH), .WORDS_PER_FRAME(WPF), .SUBFRAMES(SUBFRAMES),
                   .N_WINDOWS(N_WINDOWS)) dut (.*);
endmodule
