// tb_matched_filter: self-checking test of the RRC matched filter/downsampler.
// A QPSK stream shaped by a root-raised-cosine pulse (roll-off 0.35, 4
// samples per symbol, computed here independently) is fed with on_time on
// the symbol instants. The filter must give one output per symbol, each equal
// to the transmitted symbol SPAN symbols earlier times the filter's peak gain,
// with little inter-symbol interference. The test also checks that on_time
// alone decides which samples are kept.
module tb_matched_filter;
  import dvbs2_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int SPS = 4, SPAN = 4, TXSPAN = 8;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0, on_time = 0;
  cplx_t in;
  logic out_valid;
  cplx_t out;
  matched_filter #(.SPS(SPS), .SPAN(SPAN), .ROLLOFF(0.35)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic real rrc(input real t, input real b);
    if (t == 0.0) return 1.0 - b + 4.0 * b / PI;
    if ((4.0 * b * t) ** 2 > 0.999999 && (4.0 * b * t) ** 2 < 1.000001)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * b)) + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * b)));
    return ($sin(PI * t * (1.0 - b)) + 4.0 * b * t * $cos(PI * t * (1.0 + b))) / (PI * t * (1.0 - (4.0 * b * t) ** 2));
  endfunction
  localparam int NS = 2000;
  int sr [NS];
  int si [NS];
  int nout = 0, bad = 0;
  real maxisi = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    logic signed [15:0] xr, xi;
    int k;
    real er, ei;
    xr = out.re; xi = out.im;
    // output n corresponds to symbol n - SPAN (the filter delay)
    k = nout - SPAN;
    if (k >= TXSPAN && k < NS - TXSPAN) begin
      // both pulses have unit energy, so the peak equals the input symbol amplitude
      er = real'(xr) / 4000.0; ei = real'(xi) / 4000.0;
      if ((er > 0) != (sr[k] > 0) || (ei > 0) != (si[k] > 0)) bad++;
      if ($sqrt((er - 0.7071 * sr[k]) ** 2 + (ei - 0.7071 * si[k]) ** 2) > maxisi)
        maxisi = $sqrt((er - 0.7071 * sr[k]) ** 2 + (ei - 0.7071 * si[k]) ** 2);
    end
    nout++;
  end
  initial begin
    real t, yr, yi, e;
    e = 0;
    for (int k = -TXSPAN * SPS; k <= TXSPAN * SPS; k++) e += rrc(real'(k) / SPS, 0.35) ** 2;
    for (int i = 0; i < NS; i++) begin
      sr[i] = $urandom_range(0, 1) ? 1 : -1;
      si[i] = $urandom_range(0, 1) ? 1 : -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NS * SPS; n++) begin
      yr = 0; yi = 0;
      for (int k = n / SPS - TXSPAN; k <= n / SPS + TXSPAN; k++) if (k >= 0 && k < NS) begin
        t = real'(n) / SPS - real'(k);
        yr += sr[k] * rrc(t, 0.35) / $sqrt(e);
        yi += si[k] * rrc(t, 0.35) / $sqrt(e);
      end
      @(negedge clk);
      in_valid = 1; on_time = (n % SPS == 0);
      // symbol amplitude 0.7071*4000 per unit
      in.re = 16'($rtoi(yr * 4000.0 * $sqrt(2.0) * 0.5 * 1.0));
      in.im = 16'($rtoi(yi * 4000.0 * $sqrt(2.0) * 0.5 * 1.0));
      @(negedge clk);
      in_valid = 0;
    end
    repeat (10) @(posedge clk);
    $display("outputs %0d, sign errors %0d, worst deviation %f", nout, bad, maxisi);
    check(nout == NS, "one output per symbol");
    check(bad == 0, "outputs carry the transmitted symbols");
    check(maxisi < 0.08, "inter-symbol interference small");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
