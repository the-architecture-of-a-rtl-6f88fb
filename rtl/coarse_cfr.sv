// coarse_cfr: coarse carrier frequency recovery loop.
//
// A delay-and-multiply frequency error detector works on the pilot symbols:
// inside each 36-symbol pilot block it accumulates Im{p(k) * conj(p(k-1))},
// which is proportional to the sine of the carrier phase advance per symbol
// (the pilots are all the same known symbol, so the modulation cancels). At
// the end of each block a second-order (proportional-integral) loop filter
// turns the block's error into a frequency correction word, which the DDC's
// NCO adds to its nominal frequency: the loop closes through the DDC.
// The loop runs only while en is high (frame lock); when en falls the
// correction is held. Detector and loop order follow the receiver
// architecture; gains (as right shifts) and widths are this design's choice.
// Timing: freq_word changes two cycles after the last pilot of a block.
module coarse_cfr
  import dvbs2_pkg::*;
#(
  parameter int KP_SH = 6,
  parameter int KI_SH = 7
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               pilot_valid,
  input  cplx_t              pilot,
  input  logic               pilot_first,
  input  logic               pilot_last,
  output logic signed [31:0] freq_word,   // NCO correction, added to its increment
  output logic signed [31:0] err,         // last block's detector output
  output logic               upd          // pulses once per loop update
);
  cplx_t              prev;
  logic signed [47:0] acc;
  logic signed [47:0] integ;
  logic               fire;
  logic signed [47:0] dm;

  always_comb dm = 48'(32'(pilot.im) * 32'(prev.re) - 32'(pilot.re) * 32'(prev.im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0; acc <= '0; integ <= '0; fire <= 1'b0;
      freq_word <= '0; err <= '0; upd <= 1'b0;
    end else begin
      fire <= 1'b0;
      upd  <= 1'b0;
      if (pilot_valid && en) begin
        prev <= pilot;
        if (pilot_first) acc <= '0;
        else             acc <= acc + dm;
        fire <= pilot_last;
      end
      if (fire) begin
        err       <= 32'(acc >>> 8);
        integ     <= integ + (acc >>> KI_SH);
        freq_word <= 32'((acc >>> KP_SH) + integ + (acc >>> KI_SH));
        upd       <= 1'b1;
      end
    end
  end
endmodule
