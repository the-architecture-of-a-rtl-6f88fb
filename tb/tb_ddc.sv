// tb_ddc: self-checking test of the digital down-converter.
//
// Drives a 12-bit real tone at Fs/4 + d*Fs. With the NCO set to 2*d (in
// cycles per decimated sample) the output must be a constant complex value of
// the tone's amplitude; the test checks its magnitude and that its phase does
// not drift. It then moves the NCO by a known correction through cfr_freq and
// checks that the output rotates by that frequency, checks a 3/4 resampling
// step (4 outputs per 3 inputs), and checks that the AGC control word rises
// when the measured power is below the target.
module tb_ddc;
  import dvbs2_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic adc_valid = 0;
  logic signed [11:0] adc_data = 0;
  logic [31:0] cfg_freq;
  logic signed [31:0] cfr_freq;
  logic [17:0] cfg_rs_step;
  logic [31:0] cfg_pwr_target;
  logic out_valid;
  cplx_t out;
  logic [31:0] pwr;
  logic [11:0] agc_ctrl;
  ddc #(.PWR_LOG2(6)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real d = 0.03;
  longint n = 0;
  // ADC drive: one sample every cycle
  always @(posedge clk) if (rst_n) begin
    adc_valid <= 1'b1;
    adc_data  <= 12'($rtoi(1000.0 * $cos(2.0 * PI * (0.25 + d) * real'(n))));
    n <= n + 1;
  end

  int nout;
  real lastph, mag, dph;
  always @(posedge clk) if (rst_n && out_valid) nout++;

  task automatic collect(input int skip, input int cnt, output real mmag, output real mdph);
    real ph, prev, s, sm;
    int k;
    k = 0; s = 0; sm = 0; prev = 0;
    while (k < skip + cnt) begin
      @(posedge clk);
      if (out_valid) begin
        ph = $atan2(real'(out.im), real'(out.re));
        if (k > skip) begin
          real dd;
          dd = ph - prev;
          if (dd > PI) dd -= 2 * PI;
          if (dd < -PI) dd += 2 * PI;
          s += dd;
          sm += $sqrt(real'(out.re) * out.re + real'(out.im) * out.im);
        end
        prev = ph;
        k++;
      end
    end
    mmag = sm / (cnt - 1);
    mdph = s / (cnt - 1) / (2 * PI);
  endtask

  initial begin
    int n0, c0;
    cfg_freq = 32'($rtoi(2.0 * d * 4294967296.0));
    cfr_freq = 0;
    cfg_rs_step = 18'h10000;
    cfg_pwr_target = 32'd100_000_000;
    repeat (5) @(posedge clk);
    rst_n = 1;
    collect(100, 400, mag, dph);
    $display("tone: magnitude %f (expect 8000), rotation %f cycles/sample", mag, dph);
    check(mag > 7200 && mag < 8800, "output magnitude equals the tone amplitude");
    check(dph > -0.0005 && dph < 0.0005, "tone moved to zero frequency");
    // NCO correction of +0.01 cycles/sample rotates the output by -0.01
    cfr_freq = 32'sd42949673;
    collect(50, 400, mag, dph);
    $display("with correction: rotation %f cycles/sample", dph);
    check(dph > -0.0105 && dph < -0.0095, "cfr_freq shifts the NCO");
    // output count at step 1.0: one output per two ADC samples
    n0 = nout; c0 = int'(n);
    repeat (4000) @(posedge clk);
    check((nout - n0) >= 1995 && (nout - n0) <= 2005, "rate Fs/2 at step 1.0");
    // step 0.75: four outputs for every three inputs
    cfg_rs_step = 18'h0C000;
    repeat (100) @(posedge clk);
    n0 = nout;
    repeat (6000) @(posedge clk);
    $display("outputs in 6000 cycles at step 3/4: %0d", nout - n0);
    check((nout - n0) >= 3995 && (nout - n0) <= 4005, "rational rate change 4/3");
    // AGC: power (about 6.4e7) is below the 1e8 target, so the control word rises
    check(pwr > 32'd40_000_000 && pwr < 32'd90_000_000, "power measurement");
    check(agc_ctrl > 12'd2048, "AGC asks for more gain");
    $display("pwr=%0d agc=%0d", pwr, agc_ctrl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
