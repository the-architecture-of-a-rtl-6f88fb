// demapper: soft demapper for QPSK, 8PSK, 16APSK and 32APSK.
//
// For every symbol it computes the squared distance to each point of the
// constellation selected by cfg_mod and, for each bit of the label, the
// max-log likelihood ratio LLR = (min distance over points whose bit is 1)
// - (min distance over points whose bit is 0), scaled by 2^-LLR_SH and
// saturated to LLRW bits. A positive LLR favours bit 0. llr[0] belongs to the
// first bit of the symbol's label.
// Constellations (unit average energy, scaled by UNIT) are computed at
// elaboration. QPSK and 8PSK use the DVB-S2 bit labels; the APSK ring ratios
// (GAMMA16, GAMMA32_1, GAMMA32_2) are parameters and the APSK labels are
// this design's own Gray-style assignment (label = gray(point index), points
// counted from the outer ring), not the labelling of the standard.
// Demapping into the data bit sequence per modulation follows the receiver
// architecture. Output one cycle after the input; nbits gives 2..5.
module demapper
  import dvbs2_pkg::*;
#(
  parameter int  LLR_SH    = 18,
  parameter real GAMMA16   = 2.85,
  parameter real GAMMA32_1 = 2.84,
  parameter real GAMMA32_2 = 5.27
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mod_t     cfg_mod,
  input  logic     in_valid,
  input  cplx_t    in,
  input  sym_tag_t in_tag,
  output logic     out_valid,
  output logic signed [LLRW-1:0] llr [5],
  output logic [2:0] nbits,
  output sym_tag_t out_tag
);
  typedef logic signed [DW-1:0] ptab_t [128];

  function automatic int gray(input int v);
    return v ^ (v >> 1);
  endfunction

  // 8PSK angle, in units of pi/4, of each DVB-S2 label
  function automatic int ang8(input int lab);
    case (lab)
      0: return 1;  1: return 0;  2: return 4;  3: return 5;
      4: return 2;  5: return 7;  6: return 3;  default: return 6;
    endcase
  endfunction

  // point coordinates, indexed by label
  function automatic ptab_t mk(input bit want_im);
    ptab_t t;
    real pi, a, r, r1, r2, r3, v;
    int  lab;
    pi = 3.14159265358979;
    for (int i = 0; i < 128; i++) t[i] = '0;
    // QPSK: first bit -> sign of I, second bit -> sign of Q
    for (int i = 0; i < 4; i++) begin
      v = want_im ? (((i & 1) != 0) ? -1.0 : 1.0) : (((i & 2) != 0) ? -1.0 : 1.0);
      t[i] = DW'($rtoi($floor(v / $sqrt(2.0) * UNIT + 0.5)));
    end
    // 8PSK, DVB-S2 labels: angle index (units of pi/4) for each label
    for (int i = 0; i < 8; i++) begin
      a = ang8(i) * pi / 4.0;
      v = want_im ? $sin(a) : $cos(a);
      t[32 + i] = DW'($rtoi($floor(v * UNIT + 0.5)));
    end
    // 16APSK 12+4, unit average energy
    r1 = $sqrt(16.0 / (4.0 + 12.0 * GAMMA16 * GAMMA16));
    for (int i = 0; i < 16; i++) begin
      if (i < 12) begin r = r1 * GAMMA16; a = (i * 30.0 + 15.0) * pi / 180.0; end
      else        begin r = r1;           a = ((i - 12) * 90.0 + 45.0) * pi / 180.0; end
      lab = gray(i);
      v = want_im ? r * $sin(a) : r * $cos(a);
      t[64 + lab] = DW'($rtoi($floor(v * UNIT + 0.5)));
    end
    // 32APSK 16+12+4, unit average energy
    r1 = $sqrt(32.0 / (4.0 + 12.0 * GAMMA32_1 * GAMMA32_1 + 16.0 * GAMMA32_2 * GAMMA32_2));
    for (int i = 0; i < 32; i++) begin
      if (i < 16)      begin r3 = r1 * GAMMA32_2; r = r3; a = (i * 22.5 + 11.25) * pi / 180.0; end
      else if (i < 28) begin r2 = r1 * GAMMA32_1; r = r2; a = ((i - 16) * 30.0 + 15.0) * pi / 180.0; end
      else             begin r = r1;              a = ((i - 28) * 90.0 + 45.0) * pi / 180.0; end
      lab = gray(i);
      v = want_im ? r * $sin(a) : r * $cos(a);
      t[96 + lab] = DW'($rtoi($floor(v * UNIT + 0.5)));
    end
    return t;
  endfunction
  localparam ptab_t PRE = mk(1'b0);
  localparam ptab_t PIM = mk(1'b1);

  logic [2:0]  nb;
  logic [5:0]  npts;
  logic [35:0] d [32];
  logic signed [LLRW-1:0] l [5];

  always_comb begin
    nb   = 3'(bits_per_sym(cfg_mod));
    npts = 6'(1 << nb);
    for (int i = 0; i < 32; i++) begin
      logic signed [17:0] dx, dy;
      dx = 18'(in.re) - 18'(PRE[{cfg_mod, 5'(i)}]);
      dy = 18'(in.im) - 18'(PIM[{cfg_mod, 5'(i)}]);
      d[i] = 36'(dx * dx) + 36'(dy * dy);
    end
    for (int b = 0; b < 5; b++) begin
      logic [35:0] m0, m1;
      logic signed [37:0] diff;
      m0 = '1; m1 = '1;
      for (int i = 0; i < 32; i++) begin
        if (6'(i) < npts && 3'(b) < nb) begin
          // label bit for llr[b] is bit (nb-1-b) of the label
          if (((i >> (nb - 3'(b) - 3'd1)) & 1) == 1) begin if (d[i] < m1) m1 = d[i]; end
          else                                       begin if (d[i] < m0) m0 = d[i]; end
        end
      end
      diff = (signed'(38'(m1)) - signed'(38'(m0))) >>> LLR_SH;
      if (3'(b) >= nb)                                  l[b] = '0;
      else if (diff > 38'((1 << (LLRW - 1)) - 1))       l[b] = LLRW'((1 << (LLRW - 1)) - 1);
      else if (diff < -38'((1 << (LLRW - 1)) - 1))      l[b] = LLRW'(-((1 << (LLRW - 1)) - 1));
      else                                              l[b] = LLRW'(diff);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; nbits <= '0; out_tag <= '0;
      for (int b = 0; b < 5; b++) llr[b] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int b = 0; b < 5; b++) llr[b] <= l[b];
        nbits   <= nb;
        out_tag <= in_tag;
      end
    end
  end
endmodule
