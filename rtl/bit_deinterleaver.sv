// bit_deinterleaver: assembles FEC frames from the demapper's soft bits and
// undoes the DVB-S2 bit interleaving.
//
// The transmitter's block interleaver writes a coded frame of N bits column
// by column into an array of nbits columns (N/nbits rows) and reads it row by
// row, one row per symbol. Here the soft bits of a frame's data symbols are
// written to a frame buffer in arrival order (symbol-major), and read back in
// codeword order: read address r*nbits + c for codeword bit c*(N/nbits) + r,
// i.e. the address steps by nbits and restarts at the next column when it
// passes N, so no division is needed. For QPSK the frame is read in arrival
// order (no interleaving). Two frame buffers alternate, so one frame is read
// while the next is written. A frame starts at the data symbol tagged
// data_first; N is cfg_frame_bits (64800 normal or 16200 short frames).
// Deinterleaving for 8PSK/16APSK/32APSK and frame assembly from the frame
// synchroniser's control follow the receiver architecture; the column
// twist used by the standard for 8PSK rate 3/5 is not applied.
// Timing: one symbol may be written every cycle; a full frame is read at one
// soft bit per cycle, starting two cycles after its last symbol is written.
module bit_deinterleaver
  import dvbs2_pkg::*;
#(
  parameter int MAX_BITS = 64800
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mod_t     cfg_mod,
  input  logic [16:0] cfg_frame_bits,
  input  logic     in_valid,
  input  logic signed [LLRW-1:0] in_llr [5],
  input  logic [2:0] in_nbits,
  input  sym_tag_t in_tag,
  output logic     out_valid,
  output logic signed [LLRW-1:0] out_llr,
  output logic     out_first,
  output logic     out_last,
  output logic [15:0] frames_out,
  output logic     overrun          // sticky: a frame arrived while both buffers were full
);
  localparam int MAX_SYMS = MAX_BITS / 2;
  localparam int AW = $clog2(2 * MAX_SYMS);
  typedef logic [5*LLRW-1:0] word_t;
  word_t mem [2 * MAX_SYMS];

  // ---------------- write side ----------------
  logic        started, wbank;
  logic [15:0] wsym;
  logic [16:0] wbits;
  logic        full [2];
  word_t       wword;

  wire take = in_valid && in_tag.kind == SYM_DATA && (started || in_tag.data_first);
  wire [15:0] wsym_now = in_tag.data_first ? 16'd0 : wsym;
  wire [16:0] wbits_now = in_tag.data_first ? 17'd0 : wbits;

  always_comb for (int b = 0; b < 5; b++) wword[b*LLRW +: LLRW] = in_llr[b];

  // ---------------- read side ----------------
  logic        reading, rbank;
  logic [16:0] rbit, rcnt;       // running bit address r*nbits + c, bits read
  logic [15:0] rrow;
  logic [2:0]  rcol, rnb;
  logic        ilv;
  logic [2:0]  col_d;
  word_t       rword;

  always_ff @(posedge clk) begin
    if (take) mem[AW'(wbank ? MAX_SYMS : 0) + AW'(wsym_now)] <= wword;
    rword <= mem[AW'(rbank ? MAX_SYMS : 0) + AW'(rrow)];
    col_d <= rcol;
  end
  assign out_llr = rword[col_d*LLRW +: LLRW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started <= 1'b0; wbank <= 1'b0; wsym <= '0; wbits <= '0;
      full[0] <= 1'b0; full[1] <= 1'b0; overrun <= 1'b0;
      reading <= 1'b0; rbank <= 1'b0; rbit <= '0; rcnt <= '0; rrow <= '0; rcol <= '0;
      rnb <= '0; ilv <= 1'b0;
      out_valid <= 1'b0; out_first <= 1'b0; out_last <= 1'b0; frames_out <= '0;
    end else begin
      // write: one symbol word per cycle
      if (take) begin
        started <= 1'b1;
        if (wsym_now == 0 && full[wbank]) overrun <= 1'b1;
        if (wbits_now + 17'(in_nbits) >= cfg_frame_bits) begin
          wsym  <= '0;
          wbits <= '0;
          full[wbank] <= 1'b1;
          wbank <= ~wbank;
        end else begin
          wsym  <= wsym_now + 1'b1;
          wbits <= wbits_now + 17'(in_nbits);
        end
      end

      // read: one soft bit per cycle, in codeword order
      out_valid <= reading;
      out_first <= reading && rcnt == 0;
      out_last  <= reading && rcnt + 1'b1 == cfg_frame_bits;
      if (!reading) begin
        if (full[rbank]) begin
          reading <= 1'b1;
          rbit <= '0; rcnt <= '0; rrow <= '0; rcol <= '0;
          rnb  <= 3'(bits_per_sym(cfg_mod));
          ilv  <= (cfg_mod != MOD_QPSK);
        end
      end else begin
        rcnt <= rcnt + 1'b1;
        if (ilv) begin
          // down a column; past the last row, on to the next column
          if (rbit + 17'(rnb) >= cfg_frame_bits) begin
            rbit <= 17'(rcol) + 17'd1;
            rrow <= '0;
            rcol <= rcol + 1'b1;
          end else begin
            rbit <= rbit + 17'(rnb);
            rrow <= rrow + 1'b1;
          end
        end else begin
          // along the row: the bits of one symbol in order
          if (rcol + 1'b1 == rnb) begin
            rcol <= '0;
            rrow <= rrow + 1'b1;
          end else rcol <= rcol + 1'b1;
        end
        if (rcnt + 1'b1 == cfg_frame_bits) begin
          reading      <= 1'b0;
          full[rbank]  <= 1'b0;
          rbank        <= ~rbank;
          frames_out   <= frames_out + 1'b1;
        end
      end
    end
  end

  logic unused;
  assign unused = ^{in_tag.frame_first, in_tag.pilot_last, in_tag.idx};
endmodule
