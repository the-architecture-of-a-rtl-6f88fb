// cmult: complex multiplier, y = a * b, registered.
//
// Both operands are cplx_t. The product is shifted right by SHIFT bits and
// saturated to 16 bits. One cycle of latency; in_valid travels with the data.
// Used wherever the receiver mixes a sample with a carrier or a correction
// phasor; the shift/saturation format is this design's own choice.
module cmult
  import dvbs2_pkg::*;
#(
  parameter int SHIFT = 14
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t a,
  input  cplx_t b,
  output logic  out_valid,
  output cplx_t y
);
  logic signed [47:0] pr, pi;
  always_comb begin
    pr = (48'(a.re) * 48'(b.re) - 48'(a.im) * 48'(b.im)) >>> SHIFT;
    pi = (48'(a.re) * 48'(b.im) + 48'(a.im) * 48'(b.re)) >>> SHIFT;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y.re <= sat16(pr);
        y.im <= sat16(pi);
      end
    end
  end
endmodule
