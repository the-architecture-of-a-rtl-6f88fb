// fine_cfr: fine carrier frequency recovery, feedforward.
//
// Estimator: the Luise & Reggiannini (L&R) algorithm on each pilot block. For
// every pilot p(k) of a block it adds p(k) * conj(p(k-m)) for the lags
// m = 1..N_LAG available in the block, giving sum_m R(m). The block sums are
// averaged across blocks (first-order, weight 2^-AVG_SH) and the frequency
// estimate, as a phase advance per symbol, is arg(sum) divided by the mean
// lag weighted by the number of products per lag (about (N_LAG + 1) / 2);
// the argument comes from a CORDIC.
// Corrector: an integrator adds that advance to a phase accumulator on every
// symbol of the stream, and a look-up-table rotator multiplies the symbol by
// e^{-j*phase}. Since the estimate is taken from pilots that have not passed
// the corrector, it is the total residual frequency, not an error.
// Estimator family and the integrator/look-up-table corrector follow the
// receiver architecture; the lag count, the averaging and all widths are this
// design's choice (the exact variant of L&R used by the original receiver is
// not known). Interface: pilots enter on the pilot port, the stream on the
// in port with its tag; out/out_tag follow the stream by three cycles.
module fine_cfr
  import dvbs2_pkg::*;
#(
  parameter int N_LAG  = 8,
  parameter int AVG_SH = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic     pilot_valid,
  input  cplx_t    pilot,
  input  logic     pilot_first,
  input  logic     pilot_last,
  input  logic     in_valid,
  input  cplx_t    in,
  input  sym_tag_t in_tag,
  output logic     out_valid,
  output cplx_t    out,
  output sym_tag_t out_tag,
  output logic signed [PW-1:0] freq_est,   // phase advance per symbol
  output logic     est_valid               // pulses when freq_est is updated
);
  localparam int RW = 40;
  // Within a block lag m has PILOT_LEN-m products, so arg(sum) is the phase
  // advance times the weighted mean lag S1/S0; KMUL = 2^16 * S0 / S1.
  function automatic int kmul_f();
    int s0, s1;
    s0 = 0; s1 = 0;
    for (int m = 1; m <= N_LAG; m++) begin
      s0 += PILOT_LEN - m;
      s1 += m * (PILOT_LEN - m);
    end
    return (65536 * s0 + s1 / 2) / s1;
  endfunction
  localparam int KMUL = kmul_f();
  cplx_t hist [N_LAG];
  logic [5:0] kcnt;
  logic signed [RW-1:0] rb_re, rb_im, ra_re, ra_im;
  logic have_avg, calc;

  // lag products of the incoming pilot
  logic signed [RW-1:0] lr, li;
  always_comb begin
    lr = '0; li = '0;
    for (int m = 1; m <= N_LAG; m++) begin
      if (!pilot_first && kcnt >= 6'(m)) begin
        lr += RW'((40'(pilot.re) * 40'(hist[m-1].re) + 40'(pilot.im) * 40'(hist[m-1].im)) >>> 8);
        li += RW'((40'(pilot.im) * 40'(hist[m-1].re) - 40'(pilot.re) * 40'(hist[m-1].im)) >>> 8);
      end
    end
  end

  logic [PW-1:0]   ang;
  logic [RW+1:0]   mag;
  cordic_vector #(.W(RW), .ITER(16)) u_arg (.x(ra_re), .y(ra_im), .angle(ang), .mag(mag));

  logic signed [PW+17:0] inc_full;
  always_comb inc_full = (PW+18)'(signed'(ang)) * (PW+18)'(KMUL);

  logic [PW-1:0] phase;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_LAG; i++) hist[i] <= '0;
      kcnt <= '0; rb_re <= '0; rb_im <= '0; ra_re <= '0; ra_im <= '0;
      have_avg <= 1'b0; calc <= 1'b0; freq_est <= '0; est_valid <= 1'b0; phase <= '0;
    end else begin
      calc      <= 1'b0;
      est_valid <= 1'b0;
      if (pilot_valid && en) begin
        hist[0] <= pilot;
        for (int i = 1; i < N_LAG; i++) hist[i] <= hist[i-1];
        if (pilot_first) begin
          kcnt <= 6'd1; rb_re <= '0; rb_im <= '0;
        end else begin
          kcnt  <= kcnt + 1'b1;
          rb_re <= rb_re + lr;
          rb_im <= rb_im + li;
        end
        if (pilot_last) begin
          if (have_avg) begin
            ra_re <= ra_re + ((rb_re + lr - ra_re) >>> AVG_SH);
            ra_im <= ra_im + ((rb_im + li - ra_im) >>> AVG_SH);
          end else begin
            ra_re <= rb_re + lr;
            ra_im <= rb_im + li;
          end
          have_avg <= 1'b1;
          calc     <= 1'b1;
        end
      end
      if (calc) begin
        freq_est  <= PW'(inc_full >>> 16);
        est_valid <= 1'b1;
      end
      if (in_valid) phase <= phase + freq_est;
    end
  end

  phase_rotator #(.LUT_BITS(10), .TAGW($bits(sym_tag_t))) u_rot (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(in), .phase(phase), .in_tag(in_tag),
    .out_valid(out_valid), .y(out), .out_tag(out_tag));

  logic unused;
  assign unused = ^mag;
endmodule
