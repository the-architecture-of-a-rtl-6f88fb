// str: symbol timing recovery.
//
// A second-order feedback loop re-samples the input stream (SPS samples per
// symbol, 2 or 4) at instants locked to the transmitted symbols:
//   * a Farrow-structured cubic (Lagrange) interpolator computes the sample at
//     fractional position mu between the two middle samples of a 4-sample
//     history;
//   * an interpolation controller keeps the position of the next output, pos,
//     in input samples; every output advances it by 1 + v and every input
//     sample moves it back by one, so the output rate equals the input rate
//     while v slides the sampling instants;
//   * a Gardner timing error detector, e = Re{y(k-1/2) * conj(y(k) - y(k-1))},
//     evaluated once per symbol, feeds a proportional-integral loop filter that
//     produces v (clamped to +-V_MAX/65536 of a sample).
// Output samples carry on_time, set on the one sample per symbol that lies on
// the symbol instant; the matched filter uses it to downsample.
// The loop structure, interpolator and detector follow the receiver
// architecture; the gains, widths and the controller are this design's own.
// Interface: in_valid/in one sample per pulse, inputs at most every 2nd cycle;
// out_valid pulses once per output (at most one per cycle).
module str
  import dvbs2_pkg::*;
#(
  parameter int SPS    = 4,
  parameter int KP_SH  = 18,
  parameter int KI_SH  = 26,
  parameter int V_MAX  = 8192
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in,
  output logic  out_valid,
  output cplx_t out,
  output logic  on_time,
  output logic signed [31:0] v_out,        // current rate correction, Q16 samples
  output logic signed [31:0] ted_err,      // last timing error
  output logic  ted_valid
);
  cplx_t       h [4];          // h[0] newest
  logic [2:0]  filled;
  logic [18:0] pos;            // unsigned Q3.16
  logic        can_out;
  logic [18:0] pos_next;
  logic signed [31:0] v;
  logic signed [47:0] integ;
  logic [$clog2(SPS)-1:0] k;
  cplx_t       y_prev, y_mid;

  // Farrow cubic interpolation of one real part, mu in Q16
  function automatic logic signed [DW-1:0] farrow(input logic signed [DW-1:0] x0, x1, x2, x3,
                                                   input logic [15:0] mu);
    logic signed [47:0] c1, c2, c3, m, acc;
    // six times the Lagrange coefficients, x3 oldest (t=-1) .. x0 newest (t=2)
    c1 = -2 * 48'(x3) - 3 * 48'(x2) + 6 * 48'(x1) - 48'(x0);
    c2 =  3 * 48'(x3) - 6 * 48'(x2) + 3 * 48'(x1);
    c3 = -48'(x3) + 3 * 48'(x2) - 3 * 48'(x1) + 48'(x0);
    m  = 48'({1'b0, mu});
    acc = c2 + ((c3 * m) >>> 16);
    acc = c1 + ((acc * m) >>> 16);
    acc = (acc * m) >>> 16;
    acc = 48'(x2) + ((acc * 48'sd10923) >>> 16);   // divide by 6
    return sat16(acc);
  endfunction

  assign can_out = (filled == 3'd4) && (pos < 19'h10000);
  always_comb begin
    pos_next = pos;
    if (can_out)                    pos_next = pos_next + 19'(32'h10000 + v);
    if (in_valid && filled == 3'd4) pos_next = pos_next - 19'h10000;
  end

  // Gardner detector on the symbol-instant output being produced now
  cplx_t y_now;
  logic signed [47:0] e_now;
  always_comb begin
    y_now.re = farrow(h[0].re, h[1].re, h[2].re, h[3].re, pos[15:0]);
    y_now.im = farrow(h[0].im, h[1].im, h[2].im, h[3].im, pos[15:0]);
    e_now = 48'(y_mid.re) * (48'(y_now.re) - 48'(y_prev.re))
          + 48'(y_mid.im) * (48'(y_now.im) - 48'(y_prev.im));
  end

  logic signed [47:0] v_new;
  always_comb begin
    // the integrator keeps 16 extra fraction bits so that small errors of
    // either sign accumulate without the rounding bias of a plain shift
    v_new = -((e_now >>> KP_SH) + ((integ + (e_now >>> (KI_SH - 16))) >>> 16));
    if (v_new > 48'(V_MAX))       v_new = 48'(V_MAX);
    else if (v_new < -48'(V_MAX)) v_new = -48'(V_MAX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) h[i] <= '0;
      filled <= '0; pos <= '0; v <= '0; integ <= '0; k <= '0;
      y_prev <= '0; y_mid <= '0; out_valid <= 1'b0; out <= '0; on_time <= 1'b0;
      ted_err <= '0; ted_valid <= 1'b0;
    end else begin
      out_valid <= can_out;
      ted_valid <= 1'b0;
      if (can_out) begin
        out     <= y_now;
        on_time <= (k == 0);
        k       <= (k == $clog2(SPS)'(SPS - 1)) ? '0 : k + 1'b1;
        if (k == $clog2(SPS)'(SPS / 2)) y_mid <= y_now;
        if (k == 0) begin
          y_prev    <= y_now;
          ted_err   <= 32'(e_now >>> 16);
          ted_valid <= 1'b1;
          if (integ + (e_now >>> (KI_SH - 16)) > (48'(V_MAX) <<< 16))       integ <= 48'(V_MAX) <<< 16;
          else if (integ + (e_now >>> (KI_SH - 16)) < -(48'(V_MAX) <<< 16)) integ <= -(48'(V_MAX) <<< 16);
          else                                                             integ <= integ + (e_now >>> (KI_SH - 16));
          v         <= 32'(v_new);
        end
      end
      pos <= pos_next[18] ? '0 : pos_next;
      if (in_valid) begin
        h[0] <= in;
        for (int i = 1; i < 4; i++) h[i] <= h[i-1];
        if (filled != 3'd4) filled <= filled + 3'd1;
      end
    end
  end
  assign v_out = v;
endmodule
