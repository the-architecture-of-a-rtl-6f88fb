// tb_nda_phase_loop: self-checking test of the NDA phase tracking loop.
// Random 16APSK and 32APSK data symbols (ring geometry of this design:
// outer/middle/inner rings offset by half a point spacing, rings 4+12 and
// 4+12+16) are rotated by a constant phase and sent with small noise.
// Checks for each mode: the loop phase converges to the offset (within
// 1 degree) for offsets of both signs; for QPSK the phase stays zero and symbols pass within 1 LSB.
module tb_nda_phase_loop;
  import dvbs2_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic en = 1, in_valid = 0;
  mod_t cfg_mod;
  cplx_t in, out;
  sym_tag_t in_tag, out_tag;
  logic out_valid, upd;
  logic [PW-1:0] phase;
  nda_phase_loop dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random point of the constellation: returns radius (unit energy) and angle
  task automatic point(input mod_t m, output real r, output real a);
    int i;
    real r1;
    if (m == MOD_16APSK) begin
      r1 = $sqrt(16.0 / (4.0 + 12.0 * 2.85 * 2.85));
      i = $urandom_range(0, 15);
      if (i < 12) begin r = r1 * 2.85; a = (i * 30.0 + 15.0) * PI / 180.0; end
      else begin r = r1; a = ((i - 12) * 90.0 + 45.0) * PI / 180.0; end
    end else if (m == MOD_32APSK) begin
      r1 = $sqrt(32.0 / (4.0 + 12.0 * 2.84 * 2.84 + 16.0 * 5.27 * 5.27));
      i = $urandom_range(0, 31);
      if (i < 16) begin r = r1 * 5.27; a = (i * 22.5 + 11.25) * PI / 180.0; end
      else if (i < 28) begin r = r1 * 2.84; a = ((i - 16) * 30.0 + 15.0) * PI / 180.0; end
      else begin r = r1; a = ((i - 28) * 90.0 + 45.0) * PI / 180.0; end
    end else begin
      r = 1.0; a = ($urandom_range(0, 3) * 90.0 + 45.0) * PI / 180.0;
    end
  endtask

  int diff_cnt;
  cplx_t sent_q [$];
  always @(posedge clk) if (rst_n && out_valid) begin
    cplx_t s;
    logic signed [15:0] a, b, c, d;
    s = sent_q.pop_front();
    a = out.re; b = s.re; c = out.im; d = s.im;
    if (a - b > 1 || b - a > 1 || c - d > 1 || d - c > 1) diff_cnt++;
  end

  task automatic run(input mod_t m, input real off_deg, input int n, output real ph_deg);
    real r, a, nr, ni;
    cfg_mod = m;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    diff_cnt = 0;
    sent_q.delete();
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      point(m, r, a);
      a += off_deg * PI / 180.0;
      nr = (real'($urandom_range(0, 200)) - 100.0) / 100.0 * 40.0;
      ni = (real'($urandom_range(0, 200)) - 100.0) / 100.0 * 40.0;
      in_valid = 1; in_tag = '0; in_tag.kind = SYM_DATA;
      in.re = 16'($rtoi(r * UNIT * $cos(a) + nr));
      in.im = 16'($rtoi(r * UNIT * $sin(a) + ni));
      sent_q.push_back(in);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    ph_deg = real'($signed(phase)) * 360.0 / 65536.0;
  endtask

  initial begin
    real p;
    cfg_mod = MOD_QPSK;
    repeat (3) @(posedge clk);
    run(MOD_16APSK, 7.0, 60000, p);
    $display("16APSK offset +7 deg: loop phase %f deg", p);
    check(p > 6.0 && p < 8.0, "16APSK locks to +7 deg");
    run(MOD_16APSK, -12.0, 60000, p);
    $display("16APSK offset -12 deg: loop phase %f deg", p);
    check(p > -13.0 && p < -11.0, "16APSK locks to -12 deg");
    run(MOD_32APSK, 5.0, 60000, p);
    $display("32APSK offset +5 deg: loop phase %f deg", p);
    check(p > 4.0 && p < 6.0, "32APSK locks to +5 deg");
    run(MOD_32APSK, -6.0, 60000, p);
    $display("32APSK offset -6 deg: loop phase %f deg", p);
    check(p > -7.0 && p < -5.0, "32APSK locks to -6 deg");
    run(MOD_QPSK, 20.0, 2000, p);
    $display("QPSK: phase %f, changed symbols %0d", p, diff_cnt);
    check(p == 0.0 && diff_cnt == 0, "transparent for QPSK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
