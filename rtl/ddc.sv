// ddc: digital down-converter from the IF band to complex baseband.
//
// Two cascaded frequency conversions, as the receiver architecture describes:
//   1. a fixed quadrature mix at Fs/4 (multiplication by 1, -j, -1, +j), then a
//      low-pass FIR that removes the image and decimates by two;
//   2. a programmable conversion running at Fs/2: an NCO whose frequency is the
//      nominal word cfg_freq plus the coarse carrier-recovery correction
//      cfr_freq, and a complex multiplier.
// A sample-rate converter then changes the rate by the rational factor set by
// cfg_rs_step (input samples per output sample, unsigned Q2.16) so that the
// output is an integer multiple (2 or 4) of the symbol rate; it uses linear
// interpolation between neighbouring samples (this design's choice). A power
// meter averages |y|^2 over 2^PWR_LOG2 output samples and integrates the error
// against cfg_pwr_target into agc_ctrl, the control word for the analog AGC
// ahead of the ADC (a larger value asks for more gain).
// The FIR is a Hamming-windowed sinc with cutoff Fs/4, its taps computed at
// elaboration; tap count, word widths and the AGC loop are this design's own.
// Interface: one ADC sample per adc_valid; out_valid pulses for each output
// sample (at most one per cycle). Latency is a few cycles plus the FIR delay.
module ddc
  import dvbs2_pkg::*;
#(
  parameter int ADC_BITS = 12,
  parameter int TAPS     = 23,
  parameter int PWR_LOG2 = 10,
  parameter int AGC_SH   = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       adc_valid,
  input  logic signed [ADC_BITS-1:0] adc_data,
  input  logic [31:0]                cfg_freq,
  input  logic signed [31:0]         cfr_freq,
  input  logic [17:0]                cfg_rs_step,
  input  logic [31:0]                cfg_pwr_target,
  output logic                       out_valid,
  output cplx_t                      out,
  output logic [31:0]                pwr,
  output logic [11:0]                agc_ctrl
);
  localparam int M = (TAPS - 1) / 2;
  typedef logic signed [17:0] coef_t [TAPS];
  function automatic coef_t mk_coef();
    coef_t c;
    real pi, s, w, t;
    pi = 3.14159265358979;
    for (int k = 0; k < TAPS; k++) begin
      t = real'(k - M);
      s = (k == M) ? 0.5 : $sin(pi * 0.5 * t) / (pi * t);
      w = 0.54 - 0.46 * $cos(2.0 * pi * k / (TAPS - 1));
      // gain of two restores the amplitude lost by the real-to-complex mix
      c[k] = 18'($rtoi($floor(2.0 * s * w * 32768.0 + 0.5)));
    end
    return c;
  endfunction
  localparam coef_t COEF = mk_coef();

  // ---------------- stage 1: Fs/4 mix, FIR, decimate by 2 ----------------
  logic [1:0]            quad;
  logic                  dec_ph;
  logic signed [DW-1:0]  xi, xq, x16;
  logic signed [DW-1:0]  dli [TAPS];
  logic signed [DW-1:0]  dlq [TAPS];
  logic                  fir_go;
  logic signed [47:0]    acc_i, acc_q;
  cplx_t                 fir_out;
  logic                  fir_valid;

  assign x16 = DW'(adc_data) <<< (DW - 1 - ADC_BITS);
  always_comb begin
    case (quad)
      2'd0:    begin xi = x16;  xq = '0;   end
      2'd1:    begin xi = '0;   xq = -x16; end
      2'd2:    begin xi = -x16; xq = '0;   end
      default: begin xi = '0;   xq = x16;  end
    endcase
  end

  always_comb begin
    acc_i = '0;
    acc_q = '0;
    for (int k = 0; k < TAPS; k++) begin
      acc_i += 48'(dli[k]) * 48'(COEF[k]);
      acc_q += 48'(dlq[k]) * 48'(COEF[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quad <= '0; dec_ph <= 1'b0; fir_go <= 1'b0; fir_valid <= 1'b0; fir_out <= '0;
      for (int k = 0; k < TAPS; k++) begin dli[k] <= '0; dlq[k] <= '0; end
    end else begin
      fir_go <= 1'b0;
      if (adc_valid) begin
        quad   <= quad + 2'd1;
        dec_ph <= ~dec_ph;
        fir_go <= dec_ph;
        dli[0] <= xi;
        dlq[0] <= xq;
        for (int k = 1; k < TAPS; k++) begin dli[k] <= dli[k-1]; dlq[k] <= dlq[k-1]; end
      end
      fir_valid <= fir_go;
      if (fir_go) begin
        fir_out.re <= sat16(acc_i >>> 15);
        fir_out.im <= sat16(acc_q >>> 15);
      end
    end
  end

  // ---------------- stage 2: NCO and complex multiplier at Fs/2 ----------------
  logic        nco_valid;
  cplx_t       carrier;
  logic [31:0] nco_phase;
  cplx_t       fir_d;
  logic        mix_valid;
  cplx_t       mix_out;

  nco #(.LUT_BITS(10), .AMP(16383)) u_nco (
    .clk(clk), .rst_n(rst_n), .en(fir_valid), .freq(cfg_freq + cfr_freq),
    .out_valid(nco_valid), .carrier(carrier), .phase(nco_phase));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         fir_d <= '0;
    else if (fir_valid) fir_d <= fir_out;
  end

  cmult #(.SHIFT(14)) u_mix (
    .clk(clk), .rst_n(rst_n), .in_valid(nco_valid), .a(fir_d), .b(carrier),
    .out_valid(mix_valid), .y(mix_out));

  // ---------------- stage 3: rational sample-rate converter ----------------
  // pos is the position of the next output, in input samples, measured from s0.
  cplx_t        s0, s1;
  logic [1:0]   filled;
  logic [18:0]  pos;         // unsigned Q3.16
  logic         can_out;
  logic [18:0]  pos_next;
  logic signed [47:0] ir, ii;
  logic signed [17:0] mu;

  assign can_out = (filled == 2'd2) && (pos < 19'h10000);
  assign mu      = 18'({2'b00, pos[15:0]});
  always_comb begin
    ir = 48'(s0.re) + ((48'(s1.re) - 48'(s0.re)) * 48'(mu) >>> 16);
    ii = 48'(s0.im) + ((48'(s1.im) - 48'(s0.im)) * 48'(mu) >>> 16);
    pos_next = pos;
    if (can_out)   pos_next = pos_next + 19'(cfg_rs_step);
    if (mix_valid && filled == 2'd2) pos_next = pos_next - 19'h10000;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0 <= '0; s1 <= '0; filled <= '0; pos <= '0; out_valid <= 1'b0; out <= '0;
    end else begin
      out_valid <= can_out;
      if (can_out) begin
        out.re <= sat16(ir);
        out.im <= sat16(ii);
      end
      // an underflowing position can only come from a step below one sample
      pos <= pos_next[18] ? '0 : pos_next;
      if (mix_valid) begin
        s0 <= s1;
        s1 <= mix_out;
        if (filled != 2'd2) filled <= filled + 2'd1;
      end
    end
  end

  // ---------------- power measurement and analog AGC control ----------------
  logic [PWR_LOG2-1:0] pcnt;
  logic [47:0]         pacc;
  logic signed [31:0]  agc_i;
  logic signed [33:0]  agc_upd;

  always_comb agc_upd = 34'(agc_i) + (34'(signed'({1'b0, cfg_pwr_target})) - 34'(signed'({1'b0, pwr}))) >>> AGC_SH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt <= '0; pacc <= '0; pwr <= '0; agc_i <= 32'sd2048 <<< 8;
    end else if (out_valid) begin
      pcnt <= pcnt + 1'b1;
      if (pcnt == '1) begin
        pwr   <= 32'((pacc + 48'(32'(out.re) * 32'(out.re)) + 48'(32'(out.im) * 32'(out.im))) >> PWR_LOG2);
        pacc  <= '0;
      end else begin
        pacc  <= pacc + 48'(32'(out.re) * 32'(out.re)) + 48'(32'(out.im) * 32'(out.im));
      end
      if (pcnt == '0) begin
        // one loop update per measurement block, clamped to the 20-bit range
        if (agc_upd < 0)                  agc_i <= '0;
        else if (agc_upd > 34'sh0FFFFF)   agc_i <= 32'h000FFFFF;
        else                              agc_i <= 32'(agc_upd);
      end
    end
  end
  assign agc_ctrl = agc_i[19:8];

  logic unused;
  assign unused = ^{nco_phase, agc_i[31:20], agc_i[7:0], pos_next[17:16]};
endmodule
