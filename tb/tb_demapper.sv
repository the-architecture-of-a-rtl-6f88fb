// tb_demapper: self-checking test of the soft demapper against a
// floating-point max-log reference built here from the constellation
// description (DVB-S2 labels for QPSK/8PSK, gray(index) labels counted from
// the outer ring for the APSK modes). For each modulation: every ideal point
// must give hard decisions equal to its label with the expected sign, and
// for 2000 random inputs the LLRs must match the reference within 1 LSB.
module tb_demapper;
  import dvbs2_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  mod_t cfg_mod;
  logic in_valid = 0, out_valid;
  cplx_t in;
  sym_tag_t in_tag, out_tag;
  logic signed [LLRW-1:0] llr [5];
  logic [2:0] nbits;
  demapper dut (.*);
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

  real pre [32], pim [32];
  int npts, nb;
  task automatic build(input mod_t m);
    int a8 [8] = '{1, 0, 4, 5, 2, 7, 3, 6};
    real r, a, r1;
    int lab;
    nb = bits_per_sym(m);
    npts = 1 << nb;
    for (int i = 0; i < npts; i++) begin
      case (m)
        MOD_QPSK: begin
          pre[i] = ((i & 2) ? -1.0 : 1.0) / $sqrt(2.0);
          pim[i] = ((i & 1) ? -1.0 : 1.0) / $sqrt(2.0);
        end
        MOD_8PSK: begin
          pre[i] = $cos(a8[i] * PI / 4.0); pim[i] = $sin(a8[i] * PI / 4.0);
        end
        MOD_16APSK: begin
          r1 = $sqrt(16.0 / (4.0 + 12.0 * 2.85 * 2.85));
          if (i < 12) begin r = r1 * 2.85; a = (i * 30.0 + 15.0) * PI / 180.0; end
          else begin r = r1; a = ((i - 12) * 90.0 + 45.0) * PI / 180.0; end
          lab = i ^ (i >> 1);
          pre[lab] = r * $cos(a); pim[lab] = r * $sin(a);
        end
        default: begin
          r1 = $sqrt(32.0 / (4.0 + 12.0 * 2.84 * 2.84 + 16.0 * 5.27 * 5.27));
          if (i < 16) begin r = r1 * 5.27; a = (i * 22.5 + 11.25) * PI / 180.0; end
          else if (i < 28) begin r = r1 * 2.84; a = ((i - 16) * 30.0 + 15.0) * PI / 180.0; end
          else begin r = r1; a = ((i - 28) * 90.0 + 45.0) * PI / 180.0; end
          lab = i ^ (i >> 1);
          pre[lab] = r * $cos(a); pim[lab] = r * $sin(a);
        end
      endcase
    end
  endtask

  function automatic int ref_llr(input real x, input real y, input int b);
    real m0, m1, d, l;
    m0 = 1e30; m1 = 1e30;
    for (int i = 0; i < npts; i++) begin
      d = (x - pre[i] * UNIT) ** 2 + (y - pim[i] * UNIT) ** 2;
      if ((i >> (nb - 1 - b)) & 1) begin if (d < m1) m1 = d; end
      else begin if (d < m0) m0 = d; end
    end
    l = $floor((m1 - m0) / 262144.0);
    if (l > 31.0) l = 31.0;
    if (l < -31.0) l = -31.0;
    return $rtoi(l);
  endfunction

  task automatic apply(input real x, input real y);
    @(negedge clk);
    in_valid = 1; in_tag = '0;
    in.re = 16'($rtoi(x)); in.im = 16'($rtoi(y));
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    mod_t mods [4] = '{MOD_QPSK, MOD_8PSK, MOD_16APSK, MOD_32APSK};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (mods[mi]) begin
      int bad_hard, bad_soft, worst;
      cfg_mod = mods[mi];
      build(mods[mi]);
      bad_hard = 0; bad_soft = 0; worst = 0;
      for (int i = 0; i < npts; i++) begin
        apply(pre[i] * UNIT, pim[i] * UNIT);
        if (nbits != 3'(nb)) bad_hard++;
        for (int b = 0; b < nb; b++)
          if ((((i >> (nb - 1 - b)) & 1) == 1) != (llr[b] < 0) || llr[b] == 0) bad_hard++;
      end
      for (int k = 0; k < 2000; k++) begin
        real x, y;
        x = (real'($urandom_range(0, 20000)) / 10000.0 - 1.0) * 1.4 * UNIT;
        y = (real'($urandom_range(0, 20000)) / 10000.0 - 1.0) * 1.4 * UNIT;
        apply(x, y);
        for (int b = 0; b < nb; b++) begin
          int d;
          d = int'(llr[b]) - ref_llr(real'($rtoi(x)), real'($rtoi(y)), b);
          if (d < 0) d = -d;
          if (d > worst) worst = d;
          if (d > 1) bad_soft++;
        end
      end
      $display("%s: hard decision errors %0d, LLRs off by more than 1 LSB %0d (worst %0d)",
               mods[mi].name(), bad_hard, bad_soft, worst);
      check(bad_hard == 0, $sformatf("%s hard decisions on ideal points", mods[mi].name()));
      check(bad_soft == 0, $sformatf("%s LLRs match the max-log reference", mods[mi].name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
