// rx_clock_gen: sample and write strobes of the acquisition clock domain.
//
// The ADC receiver delivers a bit clock (DCO) and a frame clock (FCO) that
// rises once per sample.  Everything on the acquisition side runs on DCO; this
// block turns the FCO rising edge into the one-cycle detector enable `det_en`
// (one pulse per sample, 24 MHz rate at 24 MSPS) and marks every DECIM-th
// enable with `wr_en`, the write strobe of the peak detectors and block RAMs
// (3 MHz rate for DECIM = 8).  The design describes these as a 24 MHz detector
// enable and a 3 MHz write clock made by a clock generator from FCO; producing
// them as enables in the DCO domain instead of as separate clocks is this
// design's choice.
//
// Timing: FCO is sampled on the rising DCO edge.  If the edge at which FCO is
// first seen high is T, det_en (and wr_en when due) are high during the cycle
// after T.  While `run` is low no strobes are made and the group counter is
// cleared, so the first sample after start begins a new group of DECIM.
module rx_clock_gen #(
  parameter int unsigned DECIM = 8
) (
  input  logic clk,      // DCO bit clock
  input  logic rst,      // synchronous, active high
  input  logic run,      // acquisition running
  input  logic fco,      // ADC frame clock, sampled as data
  output logic det_en,   // one pulse per sample
  output logic wr_en     // with det_en on every DECIM-th sample
);
  localparam int unsigned CW = (DECIM > 1) ? $clog2(DECIM) : 1;

  logic          fco_q;
  logic [CW-1:0] grp_cnt;
  logic          edge_seen;

  assign edge_seen = run && fco && !fco_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      fco_q   <= 1'b0;
      grp_cnt <= '0;
      det_en  <= 1'b0;
      wr_en   <= 1'b0;
    end else begin
      fco_q  <= fco;
      det_en <= edge_seen;
      wr_en  <= edge_seen && (grp_cnt == CW'(DECIM - 1));
      if (!run)
        grp_cnt <= '0;
      else if (edge_seen)
        grp_cnt <= (grp_cnt == CW'(DECIM - 1)) ? '0 : grp_cnt + 1'b1;
    end
  end

endmodule
