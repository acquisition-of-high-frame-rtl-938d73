// lvds_deser2: serial-to-parallel converter for two ADC channels.
//
// Each ADC channel sends its samples as a serial bit stream, most significant
// bit first, one bit per rising DCO edge, with FCO rising together with the
// first bit of each sample.  Both channels shift into a 9-bit register every
// DCO cycle.  In the cycle in which the detector enable from rx_clock_gen is
// high (one cycle after the edge that sampled the first bit of the next
// sample), bits [8:1] of the shift register hold the complete previous
// sample; the parallel outputs show those bits and are meant to be read only
// while `det_en` is high.  The design names this block the serial to parallel
// converter that turns each channel into byte-serial data, two channels per
// converter; single-data-rate serial timing and the MSB-first order are this
// design's assumptions.  The LVDS input buffers themselves are outside it.
module lvds_deser2 #(
  parameter int unsigned SAMPLE_BITS = 8
) (
  input  logic                   clk,     // DCO bit clock
  input  logic [1:0]             sdata,   // serial data of the two channels
  output logic [SAMPLE_BITS-1:0] par_a,   // parallel sample, first channel
  output logic [SAMPLE_BITS-1:0] par_b    // parallel sample, second channel
);
  logic [SAMPLE_BITS:0] sr_a, sr_b;

  always_ff @(posedge clk) begin
    sr_a <= {sr_a[SAMPLE_BITS-1:0], sdata[0]};
    sr_b <= {sr_b[SAMPLE_BITS-1:0], sdata[1]};
  end

  assign par_a = sr_a[SAMPLE_BITS:1];
  assign par_b = sr_b[SAMPLE_BITS:1];

endmodule
