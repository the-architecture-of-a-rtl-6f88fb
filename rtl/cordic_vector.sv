// cordic_vector: combinational CORDIC in vectoring mode.
//
// Returns the angle of (x, y) as an unsigned PW-bit fraction of a turn and the
// vector magnitude (times the CORDIC gain of about 1.647). The vector is first
// folded into the right half plane, then ITER micro-rotations drive y to zero.
// Used by the fine frequency estimator, the ML phase estimator and the NDA
// phase loop to take the argument of correlation sums. Purely combinational;
// the instantiating block registers the result.
module cordic_vector
  import dvbs2_pkg::*;
#(
  parameter int W    = 32,
  parameter int ITER = 16
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic [PW-1:0]       angle,
  output logic [W+1:0]        mag
);
  typedef logic [PW+3:0] atab_t [ITER];
  // atan(2^-i) as a fraction of a turn, with 4 extra fraction bits
  function automatic atab_t mk();
    atab_t t;
    for (int i = 0; i < ITER; i++)
      t[i] = (PW+4)'($rtoi($floor($atan(2.0 ** (-i)) / (2.0 * 3.14159265358979)
                                  * (2.0 ** (PW + 4)) + 0.5)));
    return t;
  endfunction
  localparam atab_t ATAN = mk();

  always_comb begin
    logic signed [W+1:0] xs, ys, xn;
    logic [PW+3:0]       a;
    if (x < 0) begin
      xs = -(W+2)'(x);
      ys = -(W+2)'(y);
      a  = (PW+4)'(1) << (PW + 3);     // half a turn
    end else begin
      xs = (W+2)'(x);
      ys = (W+2)'(y);
      a  = '0;
    end
    for (int i = 0; i < ITER; i++) begin
      if (ys >= 0) begin
        xn = xs + (ys >>> i);
        ys = ys - (xs >>> i);
        a  = a + ATAN[i];
      end else begin
        xn = xs - (ys >>> i);
        ys = ys + (xs >>> i);
        a  = a - ATAN[i];
      end
      xs = xn;
    end
    angle = PW'((a + (PW+4)'(8)) >> 4);
    mag   = (W+2)'(xs);
  end
endmodule
