// tb_str: self-checking test of the symbol timing recovery.
//
// A QPSK stream, root-raised-cosine shaped (roll-off 0.35) at 4 samples per
// symbol, is generated with a fractional timing offset and a small symbol
// rate offset (the transmitter's symbol clock 100 ppm fast). The recovered
// stream goes through the matched filter; after the loop has settled every
// on-time symbol must lie close to one of the four QPSK points, and the
// loop's rate correction must match the imposed rate offset. With the loop
// stuck, the drifting timing smears the constellation and the test fails.
module tb_str;
  import dvbs2_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  SPS = 4, SPAN = 8;
  localparam real PPM = 100.0;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic in_valid = 0;
  cplx_t in;
  logic out_valid, on_time, ted_valid;
  cplx_t out;
  logic signed [31:0] v_out, ted_err;
  str #(.SPS(SPS)) dut (.clk, .rst_n, .in_valid, .in, .out_valid, .out, .on_time, .v_out, .ted_err, .ted_valid);
  logic s_valid;
  cplx_t s;
  matched_filter #(.SPS(SPS)) u_mf (.clk, .rst_n, .in_valid(out_valid), .in(out), .on_time,
                                    .out_valid(s_valid), .out(s));

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

  function automatic real rrc(input real t, input real b);
    if (t == 0.0) return 1.0 - b + 4.0 * b / PI;
    if ((4.0 * b * t) ** 2 > 0.999999 && (4.0 * b * t) ** 2 < 1.000001)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * b)) + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * b)));
    return ($sin(PI * t * (1.0 - b)) + 4.0 * b * t * $cos(PI * t * (1.0 + b))) / (PI * t * (1.0 - (4.0 * b * t) ** 2));
  endfunction

  // symbols generated on demand; sample n is taken at time n/SPS*(1+ppm) + offset symbols
  real sre [40000];
  real sim [40000];
  initial for (int i = 0; i < 40000; i++) begin
    sre[i] = ($urandom_range(0, 1) != 0) ? 0.707 : -0.707;
    sim[i] = ($urandom_range(0, 1) != 0) ? 0.707 : -0.707;
  end

  int nsym_out = 0;
  always @(posedge clk) if (rst_n && s_valid) nsym_out++;

  // collect symbol magnitudes to judge the spread
  real sumr, sumr2;
  int  ns;
  always @(posedge clk) if (rst_n && s_valid && nsym_out > 6000 && nsym_out <= 30000) begin
    real a;
    logic signed [15:0] xr, xi;
    xr = s.re;
    xi = s.im;
    a = (xr < 0) ? -real'(xr) : real'(xr);
    sumr += a; sumr2 += a * a; ns++;
    a = (xi < 0) ? -real'(xi) : real'(xi);
    sumr += a; sumr2 += a * a; ns++;
  end

  initial begin
    real t, yr, yi, mean, sd;
    int  k0;
    sumr = 0; sumr2 = 0; ns = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 32000 * SPS; n++) begin
      t = real'(n) / SPS * (1.0 + PPM * 1e-6) + 0.37;
      yr = 0; yi = 0;
      k0 = int'($floor(t));
      for (int k = k0 - SPAN; k <= k0 + SPAN; k++) if (k >= 0 && k < 40000) begin
        yr += sre[k] * rrc(t - real'(k), 0.35);
        yi += sim[k] * rrc(t - real'(k), 0.35);
      end
      @(posedge clk);
      in_valid <= 1'b1;
      in.re <= 16'($rtoi(yr * 4000.0));
      in.im <= 16'($rtoi(yi * 4000.0));
      @(posedge clk);
      in_valid <= 1'b0;
    end
    repeat (100) @(posedge clk);
    mean = sumr / ns;
    sd = $sqrt(sumr2 / ns - mean * mean);
    $display("symbols %0d, |I|,|Q| mean %f spread %f (%f%%), rate correction v=%0d (expect about %0d)",
             nsym_out, mean, sd, 100.0 * sd / mean, v_out, $rtoi(PPM * 1e-6 * 65536.0));
    check(nsym_out > 31000 && nsym_out < 33000, "one symbol per SPS samples");
    check(sd / mean < 0.08, "symbols land on the QPSK points after settling");
    check(v_out > 0 && v_out < 20, "rate correction follows the symbol clock offset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
