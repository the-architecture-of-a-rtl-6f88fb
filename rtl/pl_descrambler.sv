// pl_descrambler: removes the DVB-S2 physical-layer scrambling.
//
// Data and pilot symbols are scrambled at the transmitter by multiplication
// with 1, j, -1 or -j chosen by R(i) = 2*z(i+131072) + z(i), where z is the
// Gold sequence x XOR y built from the two 18-stage m-sequences
//   x(i+18) = x(i+7) + x(i),            x(0) = 1, x(1..17) = 0,
//   y(i+18) = y(i+10) + y(i+7) + y(i+5) + y(i),   y(0..17) = 1,
// restarted after every PL header (scrambling code 0). The sequence
// values 131072 steps ahead are linear in the current register contents; the
// masks are x^131072 mod p(x) for each generator polynomial, computed at
// elaboration by repeated squaring over GF(2). This block multiplies each data
// or pilot symbol by conj(j^R) and passes header symbols unchanged.
// The block appears in the receiver's block diagram; its function is that of
// the DVB-S2 physical layer. Interface: one symbol per in_valid; output and
// tag follow one cycle later.
module pl_descrambler
  import dvbs2_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  cplx_t    in,
  input  sym_tag_t in_tag,
  output logic     out_valid,
  output cplx_t    out,
  output sym_tag_t out_tag,
  output logic [1:0] out_r          // scrambling value applied to this symbol
);
  // r(x) = x^(2^17) mod p(x), p given by its low 18 coefficients
  function automatic logic [17:0] pow2_17_mod(input logic [17:0] plow);
    logic [17:0] r;
    logic [35:0] sq;
    r = 18'b10;                       // x
    for (int s = 0; s < 17; s++) begin
      sq = '0;
      for (int k = 0; k < 18; k++) sq[2*k] = r[k];
      for (int b = 35; b >= 18; b--)
        if (sq[b]) sq = sq ^ (36'({1'b1, plow}) << (b - 18));
      r = sq[17:0];
    end
    return r;
  endfunction
  localparam logic [17:0] PX = 18'b000000000010000001;   // x^7 + 1
  localparam logic [17:0] PY = 18'b000000010010100001;   // x^10 + x^7 + x^5 + 1
  localparam logic [17:0] MX = pow2_17_mod(PX);
  localparam logic [17:0] MY = pow2_17_mod(PY);

  logic [17:0] xs, ys;       // xs[k] = x(i+k)
  logic [1:0]  r;
  always_comb r = {^(xs & MX) ^ ^(ys & MY), xs[0] ^ ys[0]};

  wire scrambled = (in_tag.kind == SYM_DATA) || (in_tag.kind == SYM_PILOT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs <= 18'h1; ys <= '1;
      out_valid <= 1'b0; out <= '0; out_tag <= '0; out_r <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag <= in_tag;
        if (scrambled) begin
          xs <= {xs[7] ^ xs[0], xs[17:1]};
          ys <= {ys[10] ^ ys[7] ^ ys[5] ^ ys[0], ys[17:1]};
          out_r <= r;
          case (r)
            2'd0: out <= in;
            2'd1: begin out.re <= in.im;  out.im <= -in.re; end   // times -j
            2'd2: begin out.re <= -in.re; out.im <= -in.im; end
            default: begin out.re <= -in.im; out.im <= in.re; end // times +j
          endcase
        end else begin
          xs <= 18'h1; ys <= '1;
          out   <= in;
          out_r <= '0;
        end
      end
    end
  end
endmodule
