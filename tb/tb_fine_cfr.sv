// tb_fine_cfr: self-checking test of the fine CFR estimator and corrector.
// A stream of QPSK symbols with a residual carrier frequency f0 (cycles per
// symbol) is sent with a 36-symbol pilot block (same rotation) every 1440
// symbols; pilots go to the pilot port as a pilot demultiplexer would deliver
// them. Checks: freq_est matches f0*2^16 within 2 LSB for two offsets of
// opposite sign, and after the estimate has settled the corrected stream
// keeps a constant phase (drift over 1440 symbols below 4 degrees).
module tb_fine_cfr;
  import dvbs2_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic en = 1, pilot_valid = 0, pilot_first = 0, pilot_last = 0, in_valid = 0;
  cplx_t pilot, in, out;
  sym_tag_t in_tag, out_tag;
  logic out_valid, est_valid;
  logic signed [PW-1:0] freq_est;
  fine_cfr dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase of the corrected output, with the QPSK modulation removed (x^4)
  real q4_first, q4_last;
  bit measure = 0, have_first = 0;
  always @(posedge clk) if (rst_n && out_valid && measure) begin
    logic signed [15:0] xr, xi;
    real a;
    xr = out.re; xi = out.im;
    a = $atan2(real'(xi), real'(xr));
    if (!have_first) begin q4_first = a; have_first = 1; end
    q4_last = a;
  end

  task automatic run(input real f0, output int est, output real drift_deg);
    real ph, a;
    int s;
    rst_n = 0; ph = 1.0; have_first = 0; measure = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 12; blk++) begin
      measure = (blk == 11);
      for (int k = 0; k < 1440; k++) begin
        @(negedge clk);
        // fixed data symbol (1+j) so the output phase is directly visible
        pilot_valid = 0; in_valid = 1; in_tag = '0; in_tag.kind = SYM_DATA;
        in.re = 16'($rtoi(2896.0 * $cos(ph + PI / 4)));
        in.im = 16'($rtoi(2896.0 * $sin(ph + PI / 4)));
        ph += 2.0 * PI * f0;
      end
      measure = 0;
      for (int k = 0; k < 36; k++) begin
        @(negedge clk);
        in_valid = 0; pilot_valid = 1; pilot_first = (k == 0); pilot_last = (k == 35);
        pilot.re = 16'($rtoi(2896.0 * $cos(ph + PI / 4)));
        pilot.im = 16'($rtoi(2896.0 * $sin(ph + PI / 4)));
        ph += 2.0 * PI * f0;
      end
    end
    @(negedge clk);
    pilot_valid = 0; in_valid = 0;
    repeat (5) @(negedge clk);
    est = freq_est;
    a = q4_last - q4_first;
    while (a > PI) a -= 2.0 * PI;
    while (a < -PI) a += 2.0 * PI;
    drift_deg = a * 180.0 / PI;
  endtask

  initial begin
    int est;
    real d;
    repeat (3) @(posedge clk);
    run(0.004, est, d);
    $display("f0=0.004: freq_est %0d (ideal %0d), drift %f deg", est, $rtoi(0.004 * 65536.0), d);
    check(est - 262 <= 2 && 262 - est <= 2, "estimate for f0=+0.004");
    check(d < 4.0 && d > -4.0, "corrected phase constant for f0=+0.004");
    run(-0.011, est, d);
    $display("f0=-0.011: freq_est %0d (ideal %0d), drift %f deg", est, $rtoi(-0.011 * 65536.0), d);
    check(est + 721 <= 2 && -721 - est <= 2, "estimate for f0=-0.011");
    check(d < 4.0 && d > -4.0, "corrected phase constant for f0=-0.011");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
