// phase_rotator: multiplies a complex sample by e^{-j*phase} using a
// sine/cosine look-up table and a complex multiplier (two cycles of latency).
//
// This is the "integrator look-up table" style derotator used after the fine
// frequency estimator and the phase estimator. The table has 2^LUT_BITS
// entries over one turn, computed at elaboration; amplitude 2^14 - 1 so the
// multiplier's 14-bit shift keeps the sample scale. The tag input is carried
// along with matching latency.
module phase_rotator
  import dvbs2_pkg::*;
#(
  parameter int LUT_BITS = 10,
  parameter int TAGW     = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  cplx_t           x,
  input  logic [PW-1:0]   phase,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_valid,
  output cplx_t           y,
  output logic [TAGW-1:0] out_tag
);
  localparam int N   = 1 << LUT_BITS;
  localparam int AMP = 16383;
  typedef logic signed [DW-1:0] tab_t [N];
  function automatic tab_t mk(input bit is_sin);
    tab_t t;
    for (int i = 0; i < N; i++)
      t[i] = DW'($rtoi($floor((is_sin ? $sin(2.0 * 3.14159265358979 * i / N)
                                      : $cos(2.0 * 3.14159265358979 * i / N)) * AMP + 0.5)));
    return t;
  endfunction
  localparam tab_t COS_TAB = mk(1'b0);
  localparam tab_t SIN_TAB = mk(1'b1);

  logic            v1;
  cplx_t           x1, ph1;
  logic [TAGW-1:0] tag1;
  logic [LUT_BITS-1:0] addr;
  // round the phase to the nearest table entry
  assign addr = LUT_BITS'((phase + PW'(1 << (PW - LUT_BITS - 1))) >> (PW - LUT_BITS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; x1 <= '0; ph1 <= '0; tag1 <= '0; out_tag <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        x1     <= x;
        ph1.re <= COS_TAB[addr];
        ph1.im <= -SIN_TAB[addr];
        tag1   <= in_tag;
      end
      if (v1) out_tag <= tag1;
    end
  end

  cmult #(.SHIFT(14)) u_mul (
    .clk(clk), .rst_n(rst_n), .in_valid(v1), .a(x1), .b(ph1),
    .out_valid(out_valid), .y(y));
endmodule
