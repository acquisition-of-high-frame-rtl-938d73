// sync2: two-flip-flop synchroniser for slowly changing signals.
//
// Carries level signals (the run bit, the frame-done toggle) from one clock
// domain into another.  Each bit must change at most once per few destination
// cycles; multi-bit values that go with a toggle are sampled by the receiver
// only after the synchronised toggle has changed.  Two cycles of latency.
module sync2 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end

endmodule
