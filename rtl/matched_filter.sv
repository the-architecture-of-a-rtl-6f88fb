// matched_filter: root-raised-cosine matched filter and downsampler.
//
// Filters the synchronised stream from the symbol timing recovery (SPS
// samples per symbol) with a root-raised-cosine FIR of roll-off ROLLOFF
// spanning +-SPAN symbols (2*SPAN*SPS+1 taps, computed at elaboration and
// normalised to unit energy), and keeps one output per symbol: the one whose
// centre tap sits on a sample the timing loop marked on_time. Because the
// filter delay is a whole number of symbols, the on_time mark of the newest
// sample identifies the symbol instant at the centre of the filter.
// The filter/downsampler pair follows the receiver architecture; roll-off
// default (0.35, one of the three DVB-S2 roll-offs), span and widths are this
// design's choice. Output valid one cycle after the on_time input sample;
// one symbol per SPS inputs.
module matched_filter
  import dvbs2_pkg::*;
#(
  parameter int  SPS     = 4,
  parameter int  SPAN    = 4,
  parameter real ROLLOFF = 0.35
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in,
  input  logic  on_time,
  output logic  out_valid,
  output cplx_t out
);
  localparam int TAPS = 2 * SPAN * SPS + 1;
  typedef logic signed [17:0] coef_t [TAPS];

  function automatic real rrc(input real t, input real b);
    real pi;
    pi = 3.14159265358979;
    if (t == 0.0) return 1.0 - b + 4.0 * b / pi;
    if ((4.0 * b * t) ** 2 > 0.999999 && (4.0 * b * t) ** 2 < 1.000001)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * b))
                             + (1.0 - 2.0 / pi) * $cos(pi / (4.0 * b)));
    return ($sin(pi * t * (1.0 - b)) + 4.0 * b * t * $cos(pi * t * (1.0 + b)))
           / (pi * t * (1.0 - (4.0 * b * t) ** 2));
  endfunction

  function automatic coef_t mk_coef();
    coef_t c;
    real h [TAPS];
    real e;
    e = 0.0;
    for (int k = 0; k < TAPS; k++) begin
      h[k] = rrc(real'(k - SPAN * SPS) / SPS, ROLLOFF);
      e += h[k] * h[k];
    end
    for (int k = 0; k < TAPS; k++)
      c[k] = 18'($rtoi($floor(h[k] / $sqrt(e) * 32768.0 + 0.5)));
    return c;
  endfunction
  localparam coef_t COEF = mk_coef();

  cplx_t dl [TAPS];
  logic  go;
  logic signed [47:0] ai, aq;

  always_comb begin
    ai = '0;
    aq = '0;
    for (int k = 0; k < TAPS; k++) begin
      ai += 48'(dl[k].re) * 48'(COEF[k]);
      aq += 48'(dl[k].im) * 48'(COEF[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) dl[k] <= '0;
      go <= 1'b0; out_valid <= 1'b0; out <= '0;
    end else begin
      go        <= in_valid && on_time;
      out_valid <= go;
      if (in_valid) begin
        dl[0] <= in;
        for (int k = 1; k < TAPS; k++) dl[k] <= dl[k-1];
      end
      if (go) begin
        out.re <= sat16(ai >>> 15);
        out.im <= sat16(aq >>> 15);
      end
    end
  end
endmodule
