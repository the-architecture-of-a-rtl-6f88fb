// tb_phase_est: self-checking test of the pilot-aided phase estimator.
// QPSK data symbols (1440 between pilot blocks) and 36-symbol pilot blocks
// carry a carrier phase that starts at 100 degrees and drifts by 2e-5
// cycles per symbol (also crossing +-180 degrees through the wrap). All
// symbols go to the stream port, the pilots also to the pilot port, as the
// pilot demultiplexer delivers them. Checks: theta matches the
// phase at each block within 1 degree, every symbol comes out (in
// order, with its tag) once the following pilot block has been seen, the
// de-rotated data lie within 1.5 degrees of the QPSK points, no overflow.
module tb_phase_est;
  import dvbs2_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic en = 1, pilot_valid = 0, pilot_first = 0, pilot_last = 0, in_valid = 0;
  cplx_t pilot, in, out;
  sym_tag_t in_tag, out_tag;
  logic out_valid, est_valid, overflow;
  logic [PW-1:0] theta;
  phase_est dut (.*);
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

  int nout = 0, bad_tag = 0;
  real max_err = 0.0;
  always @(posedge clk) if (rst_n && out_valid) begin
    logic signed [15:0] xr, xi;
    real a, e;
    xr = out.re; xi = out.im;
    a = $atan2(real'(xi), real'(xr));
    // distance to the nearest QPSK point (odd multiple of 45 degrees)
    e = a - PI / 4.0 - PI / 2.0 * $floor((a - PI / 4.0) / (PI / 2.0) + 0.5);
    if (e < 0) e = -e;
    // the first frame's symbols precede the first estimate: not checked
    if (out_tag.idx >= 16'd36) if (e * 180.0 / PI > max_err) max_err = e * 180.0 / PI;
    if (out_tag.idx != 16'(nout)) bad_tag++;
    nout++;
  end

  real max_theta_err = 0.0;
  initial begin
    real ph, t, d;
    int nin;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ph = 100.0 * PI / 180.0;
    nin = 0;
    for (int blk = 0; blk < 12; blk++) begin
      real pmid;
      if (blk > 0)
        for (int k = 0; k < 1440; k++) begin
          int q;
          @(negedge clk);
          pilot_valid = 0; in_valid = 1;
          q = $urandom_range(0, 3);
          in_tag = '0; in_tag.kind = SYM_DATA; in_tag.idx = 16'(nin); nin++;
          in.re = 16'($rtoi(2896.0 * $cos(ph + PI / 4 + q * PI / 2)));
          in.im = 16'($rtoi(2896.0 * $sin(ph + PI / 4 + q * PI / 2)));
          ph += 2.0 * PI * 2e-5;
        end
      pmid = ph + 2.0 * PI * 2e-5 * 17.5;
      for (int k = 0; k < 36; k++) begin
        @(negedge clk);
        in_valid = 1; pilot_valid = 1; pilot_first = (k == 0); pilot_last = (k == 35);
        in_tag = '0; in_tag.kind = SYM_PILOT; in_tag.pilot_last = (k == 35); in_tag.idx = 16'(nin); nin++;
        in.re = 16'($rtoi(2896.0 * $cos(ph + PI / 4)));
        in.im = 16'($rtoi(2896.0 * $sin(ph + PI / 4)));
        pilot.re = 16'($rtoi(2896.0 * $cos(ph + PI / 4)));
        pilot.im = 16'($rtoi(2896.0 * $sin(ph + PI / 4)));
        ph += 2.0 * PI * 2e-5;
      end
      @(negedge clk);
      pilot_valid = 0; in_valid = 0;
      repeat (60) @(negedge clk);
      t = real'(theta) * 2.0 * PI / 65536.0;
      d = t - pmid;
      d = d - 2.0 * PI * $floor(d / (2.0 * PI) + 0.5);
      if (d < 0) d = -d;
      if (d * 180.0 / PI > max_theta_err) max_theta_err = d * 180.0 / PI;
    end
    repeat (3000) @(negedge clk);
    $display("symbols in %0d out %0d, tag errors %0d, max theta error %f deg, max symbol phase error %f deg",
             nin, nout, bad_tag, max_theta_err, max_err);
    check(max_theta_err < 1.0, "pilot ML estimate");
    check(nout == nin && bad_tag == 0, "all symbols released in order");
    check(max_err < 1.5, "symbols de-rotated by the interpolated phase");
    check(!overflow, "no FIFO overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
