// tb_coarse_cfr: self-checking closed-loop test of the coarse CFR loop.
// The test models the path through the DDC: the pilots arrive with a phase
// advance per symbol of f0 - 8*freq_word/2^32 cycles (the DDC's NCO runs at
// the ADC rate, 8 samples per symbol, and subtracts the correction). Pilot
// blocks of 36 symbols are sent once per 1476 symbols. Checks: the residual
// frequency falls below 2e-5 cycles/symbol for a positive and a negative
// start offset, the detector's sign follows the offset, and with en low the
// correction is held.
module tb_coarse_cfr;
  import dvbs2_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic en = 1, pilot_valid = 0, pilot_first = 0, pilot_last = 0;
  cplx_t pilot;
  logic signed [31:0] freq_word, err;
  logic upd;
  coarse_cfr dut (.*);
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

  real ph;
  function automatic real resid(input real f0);
    return f0 - 8.0 * real'(freq_word) / 4294967296.0;
  endfunction
  task automatic block(input real f0);
    real r;
    r = resid(f0);
    ph += 2.0 * PI * r * 1440.0;     // symbols between blocks
    for (int k = 0; k < 36; k++) begin
      @(negedge clk);
      pilot_valid = 1; pilot_first = (k == 0); pilot_last = (k == 35);
      pilot.re = 16'($rtoi(2896.0 * $cos(ph + PI / 4)));
      pilot.im = 16'($rtoi(2896.0 * $sin(ph + PI / 4)));
      ph += 2.0 * PI * r;
    end
    @(negedge clk);
    pilot_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic run(input real f0);
    logic signed [31:0] e1;
    rst_n = 0; ph = 0.3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    block(f0);
    e1 = err;
    check((f0 > 0) ? (e1 > 0) : (e1 < 0), $sformatf("detector sign for f0=%f", f0));
    for (int b = 0; b < 300; b++) block(f0);
    $display("f0=%f: residual %e cycles/symbol, freq_word %0d", f0, resid(f0), freq_word);
    check(resid(f0) < 2e-5 && resid(f0) > -2e-5, $sformatf("loop converges for f0=%f", f0));
  endtask

  initial begin
    logic signed [31:0] w;
    repeat (3) @(posedge clk);
    run(0.008);
    run(-0.005);
    w = freq_word;
    en = 0;
    for (int b = 0; b < 5; b++) block(0.002);
    check(freq_word == w, "correction held while en is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
