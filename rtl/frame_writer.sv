// frame_writer: write side of the ping-pong data banks.
//
// Each peak strobe (3 MHz write rate) writes one word into every channel
// pair's bank at the address held here.  After WORDS_PER_FRAME words (375 =
// 3000 samples / 8 per channel for one frame at 24 MSPS) the frame is
// complete: the writer swaps to the other bank, records which bank was just
// filled in `done_bank`, and flips `done_tgl`, the "next frame read" interrupt
// of the packet formation logic, which crosses into the packet clock domain
// through a synchroniser.  `done_bank` changes in the same cycle as the toggle
// and then stays stable for a whole frame, so the reader may sample it once
// it sees the toggle.  When `run` is low the address returns to 0 and a
// partly written frame is dropped; frames restart at address 0 on the next
// start.  Frame length follows the published design; the restart rule is
// this design's choice.
module frame_writer #(
  parameter int unsigned WORDS_PER_FRAME = 375,
  parameter int unsigned DEPTH           = 1024,
  localparam int unsigned AW             = $clog2(DEPTH)
) (
  input  logic          clk,        // acquisition (DCO) clock
  input  logic          rst,
  input  logic          run,
  input  logic          wr_stb,     // one peak word ready for every channel
  output logic          we,         // write enable to all data banks
  output logic          wbank,      // bank being written
  output logic [AW-1:0] waddr,
  output logic          done_bank,  // bank holding the last complete frame
  output logic          done_tgl    // flips once per completed frame
);
  initial assert (WORDS_PER_FRAME <= DEPTH) else $error("frame does not fit a bank");

  logic at_end;

  assign we     = wr_stb && run;
  assign at_end = (waddr == AW'(WORDS_PER_FRAME - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      waddr     <= '0;
      wbank     <= 1'b0;
      done_bank <= 1'b1;
      done_tgl  <= 1'b0;
    end else if (!run) begin
      waddr <= '0;
    end else if (wr_stb) begin
      if (at_end) begin
        waddr     <= '0;
        wbank     <= !wbank;
        done_bank <= wbank;
        done_tgl  <= !done_tgl;
      end else begin
        waddr <= waddr + 1'b1;
      end
    end
  end

endmodule
