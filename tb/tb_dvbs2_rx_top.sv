// tb_dvbs2_rx_top: end-to-end test of the receiver at its default parameters.
//
// A transmitter model builds DVB-S2 physical-layer frames (pi/2-BPSK header
// with the SOF word, data slots, pilot blocks every 16 slots, Gold-sequence
// scrambling), shapes them with a root-raised-cosine filter at 8 samples per
// symbol and puts them on a 70/208 Fs intermediate frequency with a small
// carrier frequency offset, i.e. the 26 Mbaud / 208 MSps / roll-off 0.35
// operating point. The 12-bit samples feed the receiver, whose deinterleaved
// soft bits are compared frame by frame with the transmitted codewords.
// Two runs: QPSK short frames (no interleaving), then, after a reset, 16APSK
// short frames (bit interleaving, NDA phase loop). The test counts every
// mechanism (frame lock, timing-error updates, coarse loop updates, fine
// frequency estimates, pilot phase estimates, DAGC updates, NDA loop updates,
// sample-rate conversion, output frames) and fails if one never occurs.
module tb_dvbs2_rx_top;
  import dvbs2_pkg::*;

  localparam int    NF_QPSK  = 9;
  localparam int    NF_APSK  = 9;
  localparam int    OSR      = 8;         // ADC samples per symbol
  localparam int    SPAN     = 8;
  localparam real   PI       = 3.14159265358979;
  localparam real   F_IF     = 70.0 / 208.0;
  localparam real   DF_SYM   = 0.0002;    // carrier offset, cycles per symbol
  localparam real   TX_AMP   = 1500.0;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic                 adc_valid;
  logic signed [11:0]   adc_data;
  logic [31:0]          cfg_freq;
  logic [17:0]          cfg_rs_step;
  logic [31:0]          cfg_pwr_target;
  logic [8:0]           cfg_slots;
  logic                 cfg_pilots;
  mod_t                 cfg_mod;
  logic [16:0]          cfg_frame_bits;
  logic [11:0]          agc_ctrl;
  logic                 llr_valid, llr_first, llr_last, locked;
  logic signed [LLRW-1:0] llr;
  logic [15:0]          frames_out;
  logic                 sym_valid, eq_valid;
  cplx_t                sym, eq_sym;
  sym_tag_t             eq_tag;
  logic                 ted_valid, coarse_upd, fine_upd, phase_upd, dagc_upd, nda_upd, error_flag;
  logic signed [31:0]   coarse_freq;
  logic signed [PW-1:0] fine_freq;
  logic [19:0]          dagc_gain;

  dvbs2_rx_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- transmitter model ----------------
  localparam int NBITS = 16200;
  bit   txbits [NF_APSK][NBITS];
  real  rrc_h [2*SPAN*OSR+1];
  bit   gold_r0 [20000];
  bit   gold_r1 [20000];
  bit   plsc [64];

  function automatic real rrc(input real t, input real b);
    if (t == 0.0) return 1.0 - b + 4.0 * b / PI;
    if ((4.0 * b * t) ** 2 > 0.999999 && (4.0 * b * t) ** 2 < 1.000001)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * b)) + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * b)));
    return ($sin(PI * t * (1.0 - b)) + 4.0 * b * t * $cos(PI * t * (1.0 + b))) / (PI * t * (1.0 - (4.0 * b * t) ** 2));
  endfunction

  // Gold sequence R(i) for i < 20000, by stepping the two m-sequences
  task automatic make_gold();
    bit x [];
    bit y [];
    int n;
    n = 20000 + 131072 + 18;
    x = new[n];
    y = new[n];
    for (int i = 0; i < 18; i++) begin x[i] = (i == 0); y[i] = 1; end
    for (int i = 0; i + 18 < n; i++) begin
      x[i+18] = x[i+7] ^ x[i];
      y[i+18] = y[i+10] ^ y[i+7] ^ y[i+5] ^ y[i];
    end
    for (int i = 0; i < 20000; i++) begin
      gold_r0[i] = x[i] ^ y[i];
      gold_r1[i] = x[i+131072] ^ y[i+131072];
    end
  endtask

  function automatic int gray(input int v); return v ^ (v >> 1); endfunction

  // symbol of a label
  function automatic void map_sym(input mod_t m, input int lab, output real re, output real im);
    real r1, r, a;
    int  idx;
    if (m == MOD_QPSK) begin
      re = ((lab & 2) != 0 ? -1.0 : 1.0) / $sqrt(2.0);
      im = ((lab & 1) != 0 ? -1.0 : 1.0) / $sqrt(2.0);
    end else begin
      // 16APSK: labels are gray(index), index 0..11 outer ring, 12..15 inner
      idx = 0;
      for (int i = 0; i < 16; i++) if (gray(i) == lab) idx = i;
      r1 = $sqrt(16.0 / (4.0 + 12.0 * 2.85 * 2.85));
      if (idx < 12) begin r = r1 * 2.85; a = (idx * 30.0 + 15.0) * PI / 180.0; end
      else          begin r = r1;        a = ((idx - 12) * 90.0 + 45.0) * PI / 180.0; end
      re = r * $cos(a);
      im = r * $sin(a);
    end
  endfunction

  // one frame of symbols
  real fre [9000];
  real fim [9000];
  int  flen;
  task automatic build_frame(input mod_t m, input int f);
    int nb, slots, p, rows, s, k, lab, sc, r;
    real re, im, t;
    nb    = (m == MOD_QPSK) ? 2 : 4;
    slots = NBITS / nb / 90;
    for (int i = 0; i < NBITS; i++) txbits[f][i] = 1'($urandom_range(0, 1));
    p = 0;
    // header: SOF then PLS code, pi/2-BPSK
    for (int i = 0; i < 90; i++) begin
      bit b;
      b  = (i < 26) ? SOF_WORD[25 - i] : plsc[i - 26];
      re = (b ? -1.0 : 1.0) / $sqrt(2.0);
      fre[p] = (i % 2 == 0) ? re : -re;
      fim[p] = re;
      p++;
    end
    rows = NBITS / nb;
    sc = 0;
    for (s = 0; s < slots; s++) begin
      for (k = 0; k < 90; k++) begin
        int j;
        j = s * 90 + k;
        lab = 0;
        for (int c = 0; c < nb; c++)
          lab = (lab << 1) | int'(m == MOD_QPSK ? 32'(txbits[f][j * nb + c]) : 32'(txbits[f][c * rows + j]));
        map_sym(m, lab, re, im);
        fre[p] = re; fim[p] = im;
        p++;
      end
      if ((s + 1) % 16 == 0 && s + 1 < slots) begin
        for (k = 0; k < 36; k++) begin
          fre[p] = 1.0 / $sqrt(2.0); fim[p] = 1.0 / $sqrt(2.0); p++;
        end
      end
    end
    // scramble everything after the header
    for (int i = 90; i < p; i++) begin
      r = 2 * int'(gold_r1[i - 90]) + int'(gold_r0[i - 90]);
      re = fre[i]; im = fim[i];
      case (r)
        1: begin fre[i] = -im; fim[i] = re; end
        2: begin fre[i] = -re; fim[i] = -im; end
        3: begin fre[i] = im;  fim[i] = -re; end
        default: ;
      endcase
    end
    flen = p;
  endtask

  // ---------------- stimulus ----------------
  // symbol history for pulse shaping
  real hre [2*SPAN+1];
  real him [2*SPAN+1];
  longint nsamp;
  int     tx_frames;
  bit     stop_tx;

  task automatic push_symbol(input real re, input real im);
    for (int i = 2 * SPAN; i > 0; i--) begin hre[i] = hre[i-1]; him[i] = him[i-1]; end
    hre[0] = re; him[0] = im;
    for (int ph = 0; ph < OSR; ph++) begin
      real sr, si, a;
      sr = 0.0; si = 0.0;
      for (int i = 0; i <= 2 * SPAN; i++) begin
        int tap;
        tap = i * OSR + ph;
        if (tap <= 2 * SPAN * OSR) begin
          sr += hre[i] * rrc_h[tap];
          si += him[i] * rrc_h[tap];
        end
      end
      a = 2.0 * PI * (F_IF + DF_SYM / OSR) * real'(nsamp);
      @(posedge clk);
      adc_valid <= 1'b1;
      adc_data  <= 12'($rtoi(TX_AMP * (sr * $cos(a) - si * $sin(a))));
      nsamp++;
    end
  endtask

  task automatic transmit(input mod_t m, input int nframes);
    for (int f = 0; f < nframes; f++) begin
      build_frame(m, f);
      for (int i = 0; i < flen; i++) push_symbol(fre[i], fim[i]);
      tx_frames++;
    end
    // flush
    for (int i = 0; i < 3000; i++) push_symbol(0.0, 0.0);
  endtask

  // ---------------- output checking ----------------
  int  obit;
  bit  rxbits [NBITS];
  int  rx_frames, good_frames;
  mod_t cur_mod;
  always @(posedge clk) if (rst_n) begin
    if (llr_valid) begin
      if (llr_first) obit = 0;
      rxbits[obit] = (llr < 0);
      obit++;
      if (llr_last) begin
        int best, e;
        best = NBITS;
        for (int f = 0; f < NF_APSK; f++) begin
          e = 0;
          for (int i = 0; i < NBITS; i++) e += int'(rxbits[i] != txbits[f][i]);
          if (e < best) best = e;
        end
        rx_frames++;
        if (best == 0) good_frames++;
        $display("  frame %0d out: %0d bit errors against the closest transmitted frame", rx_frames, best);
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_lock, n_ted, n_coarse, n_fine, n_phase, n_dagc, n_nda, n_rs, n_sym, n_err;
  logic locked_d;
  always @(posedge clk) if (rst_n) begin
    locked_d <= locked;
    if (locked && !locked_d) n_lock++;
    if (ted_valid)  n_ted++;
    if (coarse_upd) n_coarse++;
    if (fine_upd)   n_fine++;
    if (phase_upd)  n_phase++;
    if (dagc_upd)   n_dagc++;
    if (nda_upd)    n_nda++;
    if (dut.u_ddc.out_valid) n_rs++;
    if (sym_valid)  n_sym++;
    if (error_flag) n_err++;
  end

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input mod_t m, input int nframes);
    int slots;
    slots = NBITS / ((m == MOD_QPSK) ? 2 : 4) / 90;
    rst_n          = 1'b0;
    adc_valid      = 1'b0;
    adc_data       = '0;
    cfg_mod        = m;
    cfg_slots      = 9'(slots);
    cfg_pilots     = 1'b1;
    cfg_frame_bits = 17'(NBITS);
    cfg_freq       = 32'($rtoi(2.0 * (F_IF - 0.25) * 4294967296.0));
    cfg_rs_step    = 18'h10000;
    cfg_pwr_target = 32'd20_000_000;
    rx_frames = 0; good_frames = 0; obit = 0;
    tx_frames = 0;
    for (int i = 0; i <= 2 * SPAN; i++) begin hre[i] = 0.0; him[i] = 0.0; end
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    transmit(m, nframes);
    @(posedge clk);
    adc_valid <= 1'b0;
    repeat (20000) @(posedge clk);
    $display("%s: %0d frames sent, %0d frames out, %0d error-free, coarse word %0d, fine %0d, gain %0d",
             m.name(), nframes, rx_frames, good_frames, coarse_freq, fine_freq, dagc_gain);
    check(rx_frames >= nframes - 4, "enough output frames");
    check(good_frames >= 4, "at least four error-free frames");
  endtask

  initial begin
    for (int i = 0; i <= 2 * SPAN * OSR; i++) rrc_h[i] = rrc(real'(i - SPAN * OSR) / OSR, 0.35) / $sqrt(OSR);
    for (int i = 0; i < 64; i++) plsc[i] = 1'($urandom_range(0, 1));
    make_gold();
    nsamp = 0;
    run(MOD_QPSK, NF_QPSK);
    run(MOD_16APSK, NF_APSK);
    $display("mechanisms: lock %0d, ted %0d, coarse %0d, fine %0d, phase %0d, dagc %0d, nda %0d, resampled %0d, symbols %0d, overruns %0d",
             n_lock, n_ted, n_coarse, n_fine, n_phase, n_dagc, n_nda, n_rs, n_sym, n_err);
    check(n_lock >= 2,   "frame lock acquired in both runs");
    check(n_ted > 0,     "timing error detector ran");
    check(n_coarse > 0,  "coarse frequency loop updated");
    check(n_fine > 0,    "fine frequency estimates made");
    check(n_phase > 0,   "pilot phase estimates made");
    check(n_dagc > 0,    "DAGC updated on pilots");
    check(n_nda > 0,     "NDA phase loop updated");
    check(n_rs > 0,      "sample-rate converter produced samples");
    check(n_err == 0,    "no buffer overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
