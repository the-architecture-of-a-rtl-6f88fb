// tb_nco: self-checking test of the numerically controlled oscillator.
// For several frequency words it checks that the phase accumulator advances
// by the word on each enabled cycle, holds when disabled, and that the
// carrier equals (cos, -sin) of the accumulator phase to within the table's
// quantisation (computed here with real arithmetic).
module tb_nco;
  import dvbs2_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic en = 0;
  logic [31:0] freq = 0;
  logic out_valid;
  cplx_t carrier;
  logic [31:0] phase;
  nco dut (.*);
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
  initial begin
    logic [31:0] expect_ph, f;
    logic signed [15:0] cr, ci;
    real a, er, ei;
    int bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_ph = 0;
    for (int t = 0; t < 4; t++) begin
      f = (t == 0) ? 32'h0100_0000 : (t == 1) ? 32'h1234_5678 : (t == 2) ? 32'hF000_0001 : $urandom;
      freq = f;
      bad = 0;
      for (int i = 0; i < 300; i++) begin
        en = ($urandom_range(0, 3) != 0);
        @(negedge clk);
        if (en) begin
          cr = carrier.re; ci = carrier.im;
          a = 2.0 * PI * real'(expect_ph[31:22]) / 1024.0;
          er = 16383.0 * $cos(a); ei = -16383.0 * $sin(a);
          if (phase != expect_ph || real'(cr) - er > 1.0 || er - real'(cr) > 1.0 ||
              real'(ci) - ei > 1.0 || ei - real'(ci) > 1.0) begin
            if (bad == 0) $display("  mismatch: phase %h expected %h, carrier %0d %0d expected %f %f", phase, expect_ph, cr, ci, er, ei);
            bad++;
          end
          expect_ph = expect_ph + f;
        end
      end
      check(bad == 0, $sformatf("frequency word %h", f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
