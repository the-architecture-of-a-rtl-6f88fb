// phase_est: pilot-aided maximum-likelihood feedforward phase recovery.
//
// For every pilot block the ML estimate of the carrier phase is the argument
// of sum_k p(k) * conj(c), c = (1+j)/sqrt(2) being the known pilot symbol;
// the argument comes from a CORDIC. Symbols are held in a FIFO until the
// pilot block that follows them has been estimated; the phase applied to the
// symbols between two consecutive blocks is then interpolated linearly from
// the previous estimate to the new one (step = wrapped difference / number of
// symbols, from a sequential divider), and each symbol is de-rotated by a
// look-up-table rotator. The wrapped difference makes the phase track beyond
// +-pi, so a small residual frequency is absorbed as well.
// Symbols that arrive while en (frame lock) is low are passed on at once with
// the last estimate. The estimator and the interpolation follow the receiver
// architecture; FIFO depth, widths and the divider are this design's choice.
// Interface: tagged stream in, pilots on a separate port (from a pilot
// demultiplexer); the output stream is delayed by up to one pilot period.
// The FIFO must hold the symbols between two pilot blocks (DEPTH).
module phase_est
  import dvbs2_pkg::*;
#(
  parameter int DEPTH_LOG2 = 12
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic     pilot_valid,
  input  cplx_t    pilot,
  input  logic     pilot_first,
  input  logic     pilot_last,
  input  logic     in_valid,
  input  cplx_t    in,
  input  sym_tag_t in_tag,
  output logic     out_valid,
  output cplx_t    out,
  output sym_tag_t out_tag,
  output logic [PW-1:0] theta,       // last pilot-block estimate
  output logic     est_valid,        // pulses for each new estimate
  output logic     overflow          // sticky: FIFO overran
);
  localparam int DEPTH = 1 << DEPTH_LOG2;
  typedef struct packed { cplx_t s; sym_tag_t t; logic hold; } ent_t;

  // ---------------- estimator ----------------
  logic signed [39:0] sr, si;
  logic               calc;
  logic [PW-1:0]      ang;
  logic [41:0]        mag;
  cordic_vector #(.W(40), .ITER(16)) u_arg (.x(sr), .y(si), .angle(ang), .mag(mag));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; si <= '0; calc <= 1'b0; theta <= '0; est_valid <= 1'b0;
    end else begin
      calc      <= 1'b0;
      est_valid <= 1'b0;
      if (pilot_valid && en) begin
        // p * (1 - j)
        if (pilot_first) begin
          sr <= 40'(pilot.re) + 40'(pilot.im);
          si <= 40'(pilot.im) - 40'(pilot.re);
        end else begin
          sr <= sr + 40'(pilot.re) + 40'(pilot.im);
          si <= si + 40'(pilot.im) - 40'(pilot.re);
        end
        calc <= pilot_last;
      end
      if (calc) begin
        theta     <= ang;
        est_valid <= 1'b1;
      end
    end
  end

  // ---------------- symbol FIFO ----------------
  ent_t mem [DEPTH];
  logic [DEPTH_LOG2:0] wp, rp;
  logic [DEPTH_LOG2:0] level;
  assign level = wp - rp;
  always_ff @(posedge clk) if (in_valid) mem[wp[DEPTH_LOG2-1:0]] <= '{s: in, t: in_tag, hold: en};
  ent_t head;
  assign head = mem[rp[DEPTH_LOG2-1:0]];

  // ---------------- segment control and interpolation ----------------
  typedef enum logic [1:0] {C_IDLE, C_WAIT, C_DIV, C_DRAIN} cstate_t;
  cstate_t cst;
  logic [DEPTH_LOG2:0] seg_cnt, seg_n, remain;
  logic [PW-1:0]       th_prev;
  logic                have_prev, est_pend;
  logic [31:0]         ph_acc;            // Q16.16 phase
  logic [31:0]         step;              // Q16.16, signed
  // divider
  logic [5:0]          dcnt;
  logic [47:0]         rem;
  logic [31:0]         quo, dividend;
  logic                neg;

  logic pop;
  logic signed [PW-1:0] dth;
  assign dth = PW'(theta - th_prev);
  assign pop = (level != 0) && (!head.hold || !en || (cst == C_DRAIN && remain != 0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cst <= C_IDLE; seg_cnt <= '0; seg_n <= '0; remain <= '0;
      th_prev <= '0; have_prev <= 1'b0; est_pend <= 1'b0; ph_acc <= '0; step <= '0;
      dcnt <= '0; rem <= '0; quo <= '0; dividend <= '0; neg <= 1'b0; overflow <= 1'b0;
    end else begin
      if (in_valid) begin
        wp <= wp + 1'b1;
        if (level == (DEPTH_LOG2+1)'(DEPTH)) overflow <= 1'b1;
      end
      if (est_valid) est_pend <= 1'b1;
      // count held entries; a pilot block's last symbol closes a segment
      if (in_valid && en) begin
        if (in_tag.pilot_last) begin
          seg_n   <= seg_cnt + 1'b1;
          seg_cnt <= '0;
          cst     <= C_WAIT;
        end else seg_cnt <= seg_cnt + 1'b1;
      end
      case (cst)
        C_WAIT: if (est_pend || est_valid) begin
          est_pend <= 1'b0;
          if (!have_prev) begin
            // first estimate after lock: hold it constant
            ph_acc <= {theta, 16'h0};
            step   <= '0;
            remain <= seg_n;
            cst    <= C_DRAIN;
          end else begin
            neg      <= dth[PW-1];
            dividend <= dth[PW-1] ? {16'(-dth), 16'h0} : {16'(dth), 16'h0};
            rem      <= '0;
            quo      <= '0;
            dcnt     <= 6'd32;
            ph_acc   <= {th_prev, 16'h0};
            cst      <= C_DIV;
          end
          have_prev <= 1'b1;
          th_prev   <= theta;
        end
        C_DIV: begin
          // restoring division, one quotient bit per cycle
          if (dcnt != 0) begin
            logic [47:0] r2;
            r2 = {rem[46:0], dividend[31]};
            dividend <= {dividend[30:0], 1'b0};
            if (r2 >= 48'(seg_n)) begin
              rem <= r2 - 48'(seg_n);
              quo <= {quo[30:0], 1'b1};
            end else begin
              rem <= r2;
              quo <= {quo[30:0], 1'b0};
            end
            dcnt <= dcnt - 1'b1;
          end else begin
            step   <= neg ? -quo : quo;
            remain <= seg_n;
            cst    <= C_DRAIN;
          end
        end
        C_DRAIN: if (remain == 0) cst <= C_IDLE;
        default: ;
      endcase
      if (pop) begin
        rp <= rp + 1'b1;
        if (head.hold && remain != 0) begin
          remain <= remain - 1'b1;
          ph_acc <= ph_acc + step;
        end
      end
      if (!en) have_prev <= 1'b0;
    end
  end

  // the phase applied to a held symbol includes its own step
  logic [PW-1:0] ph_use;
  assign ph_use = head.hold ? PW'((ph_acc + step) >> 16) : th_prev;

  phase_rotator #(.LUT_BITS(10), .TAGW($bits(sym_tag_t))) u_rot (
    .clk(clk), .rst_n(rst_n), .in_valid(pop), .x(head.s), .phase(ph_use), .in_tag(head.t),
    .out_valid(out_valid), .y(out), .out_tag(out_tag));

  logic unused;
  assign unused = ^{mag, rem[47]};
endmodule
