// nco: numerically controlled oscillator producing e^{-j*phi} carrier samples.
//
// A 32-bit phase accumulator advances by freq on every enabled cycle; its top
// LUT_BITS bits address a sine/cosine look-up table computed at elaboration.
// The output phasor is (cos(phi), -sin(phi)) scaled by AMP, so multiplying a
// sample with it shifts the spectrum down by freq/2^32 of the sample rate.
// The phase accumulator and table structure follow the receiver's DDC
// description; table size and amplitude are this design's choice.
// Timing: carrier is registered, valid one cycle after en.
module nco
  import dvbs2_pkg::*;
#(
  parameter int LUT_BITS = 10,
  parameter int AMP      = 16383
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [31:0] freq,       // phase increment per enabled cycle
  output logic        out_valid,
  output cplx_t       carrier,    // cos(phi) - j sin(phi)
  output logic [31:0] phase       // accumulator value used for 'carrier'
);
  localparam int N = 1 << LUT_BITS;
  typedef logic signed [DW-1:0] tab_t [N];

  function automatic tab_t mk_cos();
    tab_t t;
    for (int i = 0; i < N; i++)
      t[i] = DW'($rtoi($floor($cos(2.0 * 3.14159265358979 * i / N) * AMP + 0.5)));
    return t;
  endfunction
  function automatic tab_t mk_sin();
    tab_t t;
    for (int i = 0; i < N; i++)
      t[i] = DW'($rtoi($floor($sin(2.0 * 3.14159265358979 * i / N) * AMP + 0.5)));
    return t;
  endfunction
  localparam tab_t COS_TAB = mk_cos();
  localparam tab_t SIN_TAB = mk_sin();

  logic [31:0] acc;
  logic [LUT_BITS-1:0] addr;
  assign addr = acc[31 -: LUT_BITS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      carrier   <= '0;
      phase     <= '0;
    end else begin
      out_valid <= en;
      if (en) begin
        carrier.re <= COS_TAB[addr];
        carrier.im <= -SIN_TAB[addr];
        phase      <= acc;
        acc        <= acc + freq;
      end
    end
  end
endmodule
