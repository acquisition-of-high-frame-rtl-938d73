// peak_detect: peak of each group of consecutive samples of one channel.
//
// The design reduces the data of each channel eight-fold by keeping only the
// peak of every 8 consecutive samples (24 MB/s in, 3 MB/s out per channel).
// The group boundaries come from outside: `en` marks every sample and `last`
// (the write strobe) marks the final sample of a group.  The block keeps a
// running maximum of the samples of the current group and, on the last one,
// registers the group's maximum on `peak` with a one-cycle `peak_valid`.
// Taking "peak" as the largest unsigned (offset-binary) sample value is this
// design's reading; the published design does not define it further.
//
// Timing: `peak`/`peak_valid` appear the cycle after the `en && last` cycle.
module peak_detect #(
  parameter int unsigned SAMPLE_BITS = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,          // sample strobe
  input  logic                   last,        // last sample of the group
  input  logic [SAMPLE_BITS-1:0] din,
  output logic [SAMPLE_BITS-1:0] peak,
  output logic                   peak_valid
);
  logic [SAMPLE_BITS-1:0] acc;
  logic                   first;   // next sample opens a new group
  logic [SAMPLE_BITS-1:0] cand;

  always_comb begin
    cand = din;
    if (!first && acc > din)
      cand = acc;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc        <= '0;
      first      <= 1'b1;
      peak       <= '0;
      peak_valid <= 1'b0;
    end else begin
      peak_valid <= 1'b0;
      if (en) begin
        acc   <= cand;
        first <= last;
        if (last) begin
          peak       <= cand;
          peak_valid <= 1'b1;
        end
      end
    end
  end

endmodule
