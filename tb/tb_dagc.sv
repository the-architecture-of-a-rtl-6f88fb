// tb_dagc: self-checking test of the pilot-aided digital AGC.
// Blocks of 200 data symbols (random phase) and 36 pilots (1+j)/sqrt(2)
// share one amplitude A; pilots go to the pilot port and the stream port.
// Checks: after a few blocks the output magnitude is UNIT within 1 % for
// A = 2000 and after a step to A = 6000; the gain does not move during data
// symbols; with en low the gain is held even when pilots arrive; every data symbol
// comes out and every pilot updates the gain once.
module tb_dagc;
  import dvbs2_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic en = 1, pilot_valid = 0, in_valid = 0;
  cplx_t pilot, in, out;
  sym_tag_t in_tag, out_tag;
  logic out_valid, upd;
  logic [19:0] gain;
  dagc dut (.*);
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

  real mag_min, mag_max;
  int nout = 0;
  int data_moves = 0;
  always @(posedge clk) if (rst_n && out_valid && out_tag.kind == SYM_DATA) begin
    logic signed [15:0] xr, xi;
    real m;
    xr = out.re; xi = out.im;
    m = $sqrt(real'(xr) * real'(xr) + real'(xi) * real'(xi));
    nout++;
    if (m < mag_min) mag_min = m;
    if (m > mag_max) mag_max = m;
  end
  logic [19:0] g_prev;
  int upd_cnt = 0;
  always @(posedge clk) if (rst_n && upd) upd_cnt++;
  always @(posedge clk) begin
    if (in_valid && in_tag.kind == SYM_DATA && !pilot_valid && gain != g_prev) data_moves++;
    g_prev <= gain;
  end

  task automatic block(input real a);
    real ph;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      ph = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
      pilot_valid = 0; in_valid = 1; in_tag = '0; in_tag.kind = SYM_DATA;
      in.re = 16'($rtoi(a * $cos(ph))); in.im = 16'($rtoi(a * $sin(ph)));
    end
    for (int k = 0; k < 36; k++) begin
      @(negedge clk);
      pilot_valid = 1; in_valid = 1; in_tag = '0; in_tag.kind = SYM_PILOT;
      in.re = 16'($rtoi(a * 0.70710678)); in.im = in.re; pilot = in;
    end
    @(negedge clk);
    pilot_valid = 0; in_valid = 0;
  endtask

  initial begin
    logic [19:0] g;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 4; b++) block(2000.0);
    mag_min = 1e9; mag_max = 0;
    block(2000.0);
    $display("A=2000: gain %0d, output magnitude %f..%f", gain, mag_min, mag_max);
    check(mag_min > 0.99 * UNIT && mag_max < 1.01 * UNIT, "unit amplitude at A=2000");
    for (int b = 0; b < 4; b++) block(6000.0);
    mag_min = 1e9; mag_max = 0;
    block(6000.0);
    $display("A=6000: gain %0d, output magnitude %f..%f", gain, mag_min, mag_max);
    check(mag_min > 0.99 * UNIT && mag_max < 1.01 * UNIT, "unit amplitude after a step to A=6000");
    check(data_moves == 0, "gain frozen during data symbols");
    repeat (2) @(negedge clk);
    $display("data outputs %0d, gain updates %0d", nout, upd_cnt);
    check(nout == 10 * 200 && upd_cnt == 10 * 36, "one output per data symbol, one update per pilot");
    en = 0;
    g = gain;
    block(3000.0);
    check(gain == g, "gain held while en is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
