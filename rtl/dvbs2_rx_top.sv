// dvbs2_rx_top: software-radio DVB-S2 IF receiver, from ADC samples to
// deinterleaved soft bits for the LDPC/BCH decoder.
//
// Chain (one clock, the ADC sample clock):
//   ddc            Fs/4 mix, low-pass/decimate, NCO mix, rate conversion to
//                  SPS samples per symbol, power measurement for the analog AGC
//   str            Farrow/Gardner symbol timing recovery
//   matched_filter RRC filter, one sample per symbol
//   frame_sync     SOF differential correlator and lock FSM, symbol tagging
//   pl_descrambler Gold-sequence descrambling of data and pilots
//   coarse_cfr     pilot delay-and-multiply loop, closed through the DDC NCO
//   fine_cfr       pilot L&R estimate, integrator and look-up-table derotator
//   phase_est      pilot ML phase per block, linear interpolation
//   dagc           pilot vector-tracker gain
//   nda_phase_loop Q-th power phase loop (16APSK/32APSK only)
//   demapper       max-log soft demapping
//   bit_deinterleaver  FEC frame assembly and deinterleaving
// Three pilot_demux instances feed the pilot-aided estimators, as in the
// receiver's block diagram. The decoder, the Ethernet side and the analog
// front end are outside this module: the soft-bit frame stream and the AGC
// control word are its outputs. Configuration (nominal NCO frequency,
// resampling step, frame geometry, modulation) is static for constant coding
// and modulation. Status outputs pulse when each loop or estimator updates.
module dvbs2_rx_top
  import dvbs2_pkg::*;
#(
  parameter int  ADC_BITS = 12,
  parameter int  SPS      = 4,
  parameter real ROLLOFF  = 0.35,
  parameter int  MAX_BITS = 64800
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       adc_valid,
  input  logic signed [ADC_BITS-1:0] adc_data,
  input  logic [31:0]                cfg_freq,
  input  logic [17:0]                cfg_rs_step,
  input  logic [31:0]                cfg_pwr_target,
  input  logic [8:0]                 cfg_slots,
  input  logic                       cfg_pilots,
  input  mod_t                       cfg_mod,
  input  logic [16:0]                cfg_frame_bits,
  output logic [11:0]                agc_ctrl,
  output logic                       llr_valid,
  output logic signed [LLRW-1:0]     llr,
  output logic                       llr_first,
  output logic                       llr_last,
  output logic [15:0]                frames_out,
  output logic                       locked,
  output logic                       sym_valid,       // matched-filter output symbol
  output cplx_t                      sym,
  output logic                       eq_valid,        // symbol entering the demapper
  output cplx_t                      eq_sym,
  output sym_tag_t                   eq_tag,
  output logic                       ted_valid,
  output logic                       coarse_upd,
  output logic signed [31:0]         coarse_freq,
  output logic                       fine_upd,
  output logic signed [PW-1:0]       fine_freq,
  output logic                       phase_upd,
  output logic                       dagc_upd,
  output logic [19:0]                dagc_gain,
  output logic                       nda_upd,
  output logic                       error_flag       // a buffer overran
);
  // ---------------- DDC ----------------
  logic  ddc_v;
  cplx_t ddc_y;
  logic [31:0] pwr;
  ddc #(.ADC_BITS(ADC_BITS)) u_ddc (
    .clk, .rst_n, .adc_valid, .adc_data, .cfg_freq, .cfr_freq(coarse_freq),
    .cfg_rs_step, .cfg_pwr_target, .out_valid(ddc_v), .out(ddc_y), .pwr, .agc_ctrl);

  // ---------------- timing ----------------
  logic  str_v, str_on;
  cplx_t str_y;
  logic signed [31:0] str_vout, ted_err;
  str #(.SPS(SPS)) u_str (
    .clk, .rst_n, .in_valid(ddc_v), .in(ddc_y), .out_valid(str_v), .out(str_y),
    .on_time(str_on), .v_out(str_vout), .ted_err, .ted_valid);

  matched_filter #(.SPS(SPS), .ROLLOFF(ROLLOFF)) u_mf (
    .clk, .rst_n, .in_valid(str_v), .in(str_y), .on_time(str_on),
    .out_valid(sym_valid), .out(sym));

  // ---------------- frame sync and descrambling ----------------
  logic     fs_v, sof_hit;
  cplx_t    fs_y;
  sym_tag_t fs_t;
  logic [15:0] lock_events;
  frame_sync u_fs (
    .clk, .rst_n, .in_valid(sym_valid), .in(sym), .cfg_slots, .cfg_pilots,
    .out_valid(fs_v), .out(fs_y), .out_tag(fs_t), .locked, .sof_hit, .lock_events);

  logic     ds_v;
  cplx_t    ds_y;
  sym_tag_t ds_t;
  logic [1:0] ds_r;
  pl_descrambler u_ds (
    .clk, .rst_n, .in_valid(fs_v), .in(fs_y), .in_tag(fs_t),
    .out_valid(ds_v), .out(ds_y), .out_tag(ds_t), .out_r(ds_r));

  // ---------------- carrier frequency recovery ----------------
  logic     p1_v, p1_first, p1_last, q1_v;
  cplx_t    p1, q1;
  sym_tag_t q1_t;
  pilot_demux u_dmx1 (
    .clk, .rst_n, .in_valid(ds_v), .in(ds_y), .in_tag(ds_t),
    .pilot_valid(p1_v), .pilot(p1), .pilot_first(p1_first), .pilot_last(p1_last),
    .pay_valid(q1_v), .pay(q1), .pay_tag(q1_t));

  logic signed [31:0] coarse_err;
  coarse_cfr u_ccfr (
    .clk, .rst_n, .en(locked), .pilot_valid(p1_v), .pilot(p1), .pilot_first(p1_first),
    .pilot_last(p1_last), .freq_word(coarse_freq), .err(coarse_err), .upd(coarse_upd));

  logic     fc_v;
  cplx_t    fc_y;
  sym_tag_t fc_t;
  fine_cfr u_fcfr (
    .clk, .rst_n, .en(locked), .pilot_valid(p1_v), .pilot(p1), .pilot_first(p1_first),
    .pilot_last(p1_last), .in_valid(ds_v), .in(ds_y), .in_tag(ds_t),
    .out_valid(fc_v), .out(fc_y), .out_tag(fc_t), .freq_est(fine_freq), .est_valid(fine_upd));

  // ---------------- phase recovery ----------------
  logic     p2_v, p2_first, p2_last, q2_v;
  cplx_t    p2, q2;
  sym_tag_t q2_t;
  pilot_demux u_dmx2 (
    .clk, .rst_n, .in_valid(fc_v), .in(fc_y), .in_tag(fc_t),
    .pilot_valid(p2_v), .pilot(p2), .pilot_first(p2_first), .pilot_last(p2_last),
    .pay_valid(q2_v), .pay(q2), .pay_tag(q2_t));

  logic     pe_v, pe_ovf;
  cplx_t    pe_y;
  sym_tag_t pe_t;
  logic [PW-1:0] theta;
  phase_est u_pe (
    .clk, .rst_n, .en(locked), .pilot_valid(p2_v), .pilot(p2), .pilot_first(p2_first),
    .pilot_last(p2_last), .in_valid(fc_v), .in(fc_y), .in_tag(fc_t),
    .out_valid(pe_v), .out(pe_y), .out_tag(pe_t), .theta, .est_valid(phase_upd),
    .overflow(pe_ovf));

  // ---------------- amplitude control ----------------
  logic     p3_v, p3_first, p3_last, q3_v;
  cplx_t    p3, q3;
  sym_tag_t q3_t;
  pilot_demux u_dmx3 (
    .clk, .rst_n, .in_valid(pe_v), .in(pe_y), .in_tag(pe_t),
    .pilot_valid(p3_v), .pilot(p3), .pilot_first(p3_first), .pilot_last(p3_last),
    .pay_valid(q3_v), .pay(q3), .pay_tag(q3_t));

  logic     ag_v;
  cplx_t    ag_y;
  sym_tag_t ag_t;
  dagc u_dagc (
    .clk, .rst_n, .en(locked), .pilot_valid(p3_v), .pilot(p3),
    .in_valid(pe_v), .in(pe_y), .in_tag(pe_t),
    .out_valid(ag_v), .out(ag_y), .out_tag(ag_t), .gain(dagc_gain), .upd(dagc_upd));

  logic [PW-1:0] nda_phase;
  nda_phase_loop u_nda (
    .clk, .rst_n, .en(locked), .cfg_mod, .in_valid(ag_v), .in(ag_y), .in_tag(ag_t),
    .out_valid(eq_valid), .out(eq_sym), .out_tag(eq_tag), .phase(nda_phase), .upd(nda_upd));

  // ---------------- demapping and FEC frame assembly ----------------
  logic     dm_v;
  logic signed [LLRW-1:0] dm_llr [5];
  logic [2:0] dm_nb;
  sym_tag_t dm_t;
  demapper u_dm (
    .clk, .rst_n, .cfg_mod, .in_valid(eq_valid), .in(eq_sym), .in_tag(eq_tag),
    .out_valid(dm_v), .llr(dm_llr), .nbits(dm_nb), .out_tag(dm_t));

  logic di_ovr;
  bit_deinterleaver #(.MAX_BITS(MAX_BITS)) u_di (
    .clk, .rst_n, .cfg_mod, .cfg_frame_bits, .in_valid(dm_v), .in_llr(dm_llr),
    .in_nbits(dm_nb), .in_tag(dm_t), .out_valid(llr_valid), .out_llr(llr),
    .out_first(llr_first), .out_last(llr_last), .frames_out, .overrun(di_ovr));

  assign error_flag = pe_ovf | di_ovr;

  // status values kept for debugging through hierarchy
  logic unused;
  assign unused = ^{pwr, str_vout, ted_err, sof_hit, lock_events, ds_r, q1_v, q1, q1_t,
                    q2_v, q2, q2_t, q3_v, q3, q3_t, p3_first, p3_last, coarse_err, theta,
                    nda_phase};
endmodule
