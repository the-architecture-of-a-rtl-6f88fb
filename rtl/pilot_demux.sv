// pilot_demux: splits the tagged symbol stream into its pilot symbols and the
// remaining (header and data) symbols.
//
// The frame synchroniser's position tag identifies pilot-block symbols; they
// are copied to the pilot port, which drives a pilot-aided estimator, while
// the other symbols leave on the payload port. The receiver uses one such
// demultiplexer in front of each pilot-aided estimator (carrier frequency,
// phase and amplitude). Registered: outputs follow the input by one cycle.
module pilot_demux
  import dvbs2_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  cplx_t    in,
  input  sym_tag_t in_tag,
  output logic     pilot_valid,
  output cplx_t    pilot,
  output logic     pilot_first,   // first symbol of a pilot block
  output logic     pilot_last,    // last symbol of a pilot block
  output logic     pay_valid,
  output cplx_t    pay,
  output sym_tag_t pay_tag
);
  wire is_pilot = in_tag.kind == SYM_PILOT;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pilot_valid <= 1'b0; pilot <= '0; pilot_first <= 1'b0; pilot_last <= 1'b0;
      pay_valid <= 1'b0; pay <= '0; pay_tag <= '0;
    end else begin
      pilot_valid <= in_valid && is_pilot;
      pay_valid   <= in_valid && !is_pilot;
      if (in_valid && is_pilot) begin
        pilot       <= in;
        pilot_first <= (in_tag.idx == 16'd0);
        pilot_last  <= in_tag.pilot_last;
      end
      if (in_valid && !is_pilot) begin
        pay     <= in;
        pay_tag <= in_tag;
      end
    end
  end
endmodule
