// nda_phase_loop: non-data-aided phase tracking loop for 16APSK and 32APSK.
//
// Placed after the digital AGC, it removes the phase that remains after the
// pilot-aided feedforward recovery. The phase detector is of Q-th power type
// (Q = 3 for 16APSK, Q = 4 for 32APSK): it takes the argument theta of each
// de-rotated data symbol (CORDIC) and forms e = wrap(Q*theta - pi), the
// argument of y^Q against the reference -1; the reference is where the
// symbols of every ring of the constellation lie symmetrically, so e averages
// to zero at the correct phase. A proportional-integral filter (shifts KP_SH,
// KI_SH) drives a phase accumulator, and every symbol is de-rotated by it
// through the look-up-table rotator. The loop updates only on data symbols
// while en is high and cfg_mod is an APSK mode; for QPSK and 8PSK it holds
// phase zero and the block passes symbols through (rotator rounding only,
// at most 1 LSB).
// Detector type, Q values and placement follow the receiver architecture;
// the reference angle, the loop filter and its gains are this design's
// choice. Output follows the input by three cycles.
module nda_phase_loop
  import dvbs2_pkg::*;
#(
  parameter int KP_SH = 14,
  parameter int KI_SH = 28
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  mod_t     cfg_mod,
  input  logic     in_valid,
  input  cplx_t    in,
  input  sym_tag_t in_tag,
  output logic     out_valid,
  output cplx_t    out,
  output sym_tag_t out_tag,
  output logic [PW-1:0] phase,
  output logic     upd
);
  logic active;
  assign active = en && (cfg_mod == MOD_16APSK || cfg_mod == MOD_32APSK);

  cplx_t          y;
  sym_tag_t       ytag;
  logic           yv;
  logic [PW-1:0]  ang;
  logic [DW+1:0]  mag;
  cordic_vector #(.W(DW), .ITER(14)) u_arg (.x(y.re), .y(y.im), .angle(ang), .mag(mag));

  logic signed [PW-1:0] e;
  logic signed [47:0]   integ;   // 32 fraction bits
  logic [31:0]          pacc;    // phase with 16 fraction bits
  assign phase = pacc[31:16];
  always_comb e = PW'((cfg_mod == MOD_16APSK ? 3 : 4) * 32'(ang) - 32'(1 << (PW - 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pacc <= '0; integ <= '0; upd <= 1'b0;
    end else begin
      upd <= 1'b0;
      if (!active) begin
        pacc  <= '0;
        integ <= '0;
      end else if (yv && ytag.kind == SYM_DATA) begin
        // detector on the corrected output symbol
        // integrator and phase keep 16 extra fraction bits (no shift rounding bias)
        integ <= integ + ((48'(e) <<< 32) >>> KI_SH);
        pacc  <= pacc + 32'((48'(e) <<< 16 >>> KP_SH) + (integ >>> 16));
        upd   <= 1'b1;
      end
    end
  end

  phase_rotator #(.LUT_BITS(10), .TAGW($bits(sym_tag_t))) u_rot (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(in), .phase(phase), .in_tag(in_tag),
    .out_valid(yv), .y(y), .out_tag(ytag));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out <= '0; out_tag <= '0;
    end else begin
      out_valid <= yv;
      if (yv) begin out <= y; out_tag <= ytag; end
    end
  end
  // the detector sees the symbol one cycle before it leaves
  logic unused;
  assign unused = ^mag;
endmodule
