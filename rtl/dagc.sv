// dagc: digital automatic gain control with a pilot-aided vector tracker.
//
// Every symbol is multiplied by the real gain g (unsigned, G_FRAC fraction
// bits). The gain is updated only on pilot symbols and frozen on all others:
// for each pilot x the tracker projects the scaled pilot g*x onto the known
// pilot direction (1+j)/sqrt(2) and moves g by 2^-MU_SH of the difference to
// the reference amplitude UNIT, so that the pilots, and with them the data
// constellation, settle at unit amplitude. Pilots reach the tracker from a
// pilot demultiplexer ahead of the multiplier.
// The data-aided vector-tracker principle and the freeze during data follow
// the receiver architecture; step size, gain format and the start value (1.0)
// are this design's choice. Output follows the input by one cycle.
module dagc
  import dvbs2_pkg::*;
#(
  parameter int G_FRAC = 12,
  parameter int MU_SH  = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        pilot_valid,
  input  cplx_t       pilot,
  input  logic        in_valid,
  input  cplx_t       in,
  input  sym_tag_t    in_tag,
  output logic        out_valid,
  output cplx_t       out,
  output sym_tag_t    out_tag,
  output logic [19:0] gain,
  output logic        upd             // pulses on each gain update
);
  localparam int INV_SQRT2 = 46341;   // 2^16 / sqrt(2)
  logic signed [47:0] proj, amp, e, gn, gs;
  always_comb begin
    gs   = signed'(48'(gain));
    proj = ((48'(pilot.re) + 48'(pilot.im)) * 48'(INV_SQRT2)) >>> 16;
    amp  = (proj * gs) >>> G_FRAC;
    e    = 48'(UNIT) - amp;
    gn   = gs + (e >>> MU_SH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gain <= 20'(1 << G_FRAC); upd <= 1'b0;
      out_valid <= 1'b0; out <= '0; out_tag <= '0;
    end else begin
      upd <= 1'b0;
      if (pilot_valid && en) begin
        upd <= 1'b1;
        if (gn < 0)                gain <= '0;
        else if (gn > 48'hFFFFF)   gain <= '1;
        else                       gain <= 20'(gn);
      end
      out_valid <= in_valid;
      if (in_valid) begin
        out.re  <= sat16((48'(in.re) * gs) >>> G_FRAC);
        out.im  <= sat16((48'(in.im) * gs) >>> G_FRAC);
        out_tag <= in_tag;
      end
    end
  end
endmodule
