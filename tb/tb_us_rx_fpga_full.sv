// tb_us_rx_fpga_full: end-to-end test of the receive FPGA with every
// parameter at its default: 32 channels, 3000 samples (375 peaks) per channel
// per frame, 16-sample windows, 256-frame multi-frames and 23 windows.  It
// runs 4 complete frames (8 packets each) and then stops; the window cannot
// move within 4 frames, so window movement is left to tb_us_rx_fpga_top.
module tb_us_rx_fpga_full;
  localparam int N_CH = 32, WPF = 375, SUBFRAMES = 256, N_WINDOWS = 23, N_FRAMES = 4;
  localparam bit REQUIRE_ALL = 0;

  `include "us_rx_tb_body.svh"

  us_rx_fpga_top dut (.*);
endmodule
