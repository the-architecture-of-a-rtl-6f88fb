// frame_sync: physical-layer frame synchronisation.
//
// A differential correlator searches the symbol stream for the 26-symbol
// start-of-frame (SOF) field of the PL header. Each symbol is multiplied by
// the conjugate of its predecessor, which removes any carrier frequency error
// up to a constant phase; the 25 differential products are correlated with the
// products expected for the pi/2-BPSK SOF word, and a frame start is declared
// when the L1 magnitude of the correlation exceeds THR_NUM/8 of the summed L1
// magnitudes of the products (a scale-free threshold).
// A three-state machine runs acquisition and tracking:
//   SEARCH  - every symbol is tested; a hit starts the frame counters;
//   VERIFY  - the next SOF must be found exactly one frame later; CONFIRM
//             consecutive hits lead to LOCK, a miss back to SEARCH;
//   LOCK    - symbols are tagged; MISS_MAX consecutive misses return to SEARCH.
// Frame geometry comes from cfg_slots (S, the number of 90-symbol slots) and
// cfg_pilots: header (90), then S slots with a 36-symbol pilot block after
// every 16th slot except at the frame end. The geometry is configured rather
// than decoded from the PLS code (constant coding and modulation assumed).
// Correlator, FSM and pilot positions follow the receiver architecture and
// the DVB-S2 frame format; thresholds and counts are this design's choice.
// Interface: one symbol per in_valid; out_valid/out/out_tag follow one cycle
// later with the symbol's position in the frame.
module frame_sync
  import dvbs2_pkg::*;
#(
  parameter int THR_NUM  = 6,
  parameter int CONFIRM  = 2,
  parameter int MISS_MAX = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cplx_t      in,
  input  logic [8:0] cfg_slots,
  input  logic       cfg_pilots,
  output logic       out_valid,
  output cplx_t      out,
  output sym_tag_t   out_tag,
  output logic       locked,
  output logic       sof_hit,       // correlator above threshold on this symbol
  output logic [15:0] lock_events
);
  typedef enum logic [1:0] {S_SEARCH, S_VERIFY, S_LOCK} state_t;
  typedef enum logic [1:0] {F_HEADER, F_DATA, F_PILOT} field_t;
  localparam int CW = 24;
  typedef struct packed { logic signed [CW-1:0] re; logic signed [CW-1:0] im; } dcplx_t;

  state_t  state;
  field_t  field;
  logic [6:0]  cnt;
  logic [8:0]  slots_done;
  logic [3:0]  slot16;
  logic [15:0] data_idx;
  logic [2:0]  hits, misses;
  cplx_t   prev;
  dcplx_t  dp [SOF_LEN-1];     // dp[0] newest differential product

  // differential product of the incoming symbol
  dcplx_t dnew;
  always_comb begin
    dnew.re = CW'((32'(in.re) * 32'(prev.re) + 32'(in.im) * 32'(prev.im)) >>> 10);
    dnew.im = CW'((32'(in.im) * 32'(prev.re) - 32'(in.re) * 32'(prev.im)) >>> 10);
  end

  // correlation against the SOF pattern; the product ending at SOF symbol k
  // (k = 1..25) is expected to be d_k * (k odd ? +j : -j)
  logic signed [31:0] cr, ci, en;
  logic [31:0] cmag;
  logic hit;
  always_comb begin
    dcplx_t c;
    logic   d;
    cr = '0; ci = '0; en = '0;
    for (int k = 1; k < SOF_LEN; k++) begin
      c = (k == SOF_LEN - 1) ? dnew : dp[SOF_LEN - 2 - k];
      d = SOF_WORD[SOF_LEN - 1 - k] ^ SOF_WORD[SOF_LEN - k];   // 1: sign change
      en += (c.re < 0 ? -32'(c.re) : 32'(c.re)) + (c.im < 0 ? -32'(c.im) : 32'(c.im));
      // multiply by conj(expected): odd k -> (-j)*d, even k -> (+j)*d
      if ((k % 2 == 1) ^ d) begin cr += 32'(c.im); ci -= 32'(c.re); end
      else                  begin cr -= 32'(c.im); ci += 32'(c.re); end
    end
    cmag = (cr < 0 ? 32'(-cr) : 32'(cr)) + (ci < 0 ? 32'(-ci) : 32'(ci));
    hit  = (36'(cmag) * 36'd8 > 36'(en) * 36'(THR_NUM)) && (en > 32'sd64);
  end

  wire at_sof_end = (field == F_HEADER) && (cnt == 7'(SOF_LEN - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_SEARCH; field <= F_HEADER; cnt <= '0; slots_done <= '0; slot16 <= '0;
      data_idx <= '0; hits <= '0; misses <= '0; prev <= '0;
      for (int i = 0; i < SOF_LEN - 1; i++) dp[i] <= '0;
      out_valid <= 1'b0; out <= '0; out_tag <= '0; sof_hit <= 1'b0; lock_events <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        prev  <= in;
        dp[0] <= dnew;
        for (int i = 1; i < SOF_LEN - 1; i++) dp[i] <= dp[i-1];
        out     <= in;
        sof_hit <= hit;

        // tag of this symbol
        out_tag <= '0;
        if (state == S_LOCK) begin
          case (field)
            F_HEADER: begin
              out_tag.kind        <= SYM_HEADER;
              out_tag.idx         <= 16'(cnt);
              out_tag.frame_first <= (cnt == 0);
            end
            F_DATA: begin
              out_tag.kind       <= SYM_DATA;
              out_tag.idx        <= data_idx;
              out_tag.data_first <= (data_idx == 0);
            end
            default: begin
              out_tag.kind       <= SYM_PILOT;
              out_tag.idx        <= 16'(cnt);
              out_tag.pilot_last <= (cnt == 7'(PILOT_LEN - 1));
            end
          endcase
        end

        // frame position counters
        case (field)
          F_HEADER: begin
            if (cnt == 7'(SLOT_LEN - 1)) begin
              field <= F_DATA; cnt <= '0; slots_done <= '0; slot16 <= '0; data_idx <= '0;
            end else cnt <= cnt + 1'b1;
          end
          F_DATA: begin
            data_idx <= data_idx + 1'b1;
            if (cnt == 7'(SLOT_LEN - 1)) begin
              cnt        <= '0;
              slots_done <= slots_done + 1'b1;
              slot16     <= slot16 + 1'b1;
              if (slots_done + 1'b1 == cfg_slots)             field <= F_HEADER;
              else if (cfg_pilots && slot16 == 4'd15)         field <= F_PILOT;
            end else cnt <= cnt + 1'b1;
          end
          default: begin
            if (cnt == 7'(PILOT_LEN - 1)) begin field <= F_DATA; cnt <= '0; end
            else cnt <= cnt + 1'b1;
          end
        endcase

        // acquisition and tracking
        case (state)
          S_SEARCH: if (hit) begin
            state <= S_VERIFY; hits <= 3'd1; misses <= '0;
            field <= F_HEADER; cnt <= 7'(SOF_LEN);
          end
          S_VERIFY: if (at_sof_end) begin
            if (hit) begin
              hits <= hits + 1'b1;
              if (hits + 1'b1 >= 3'(CONFIRM)) begin
                state <= S_LOCK;
                lock_events <= lock_events + 1'b1;
              end
            end else state <= S_SEARCH;
          end
          default: if (at_sof_end) begin
            if (hit) misses <= '0;
            else if (misses + 1'b1 >= 3'(MISS_MAX)) state <= S_SEARCH;
            else misses <= misses + 1'b1;
          end
        endcase
      end
    end
  end
  assign locked = (state == S_LOCK);
endmodule
