// tb_bit_deinterleaver: self-checking test of frame assembly and bit
// deinterleaving. Short frames (16200 bits) of random soft bits are written
// one symbol per cycle, back to back, for 16APSK, 8PSK, 32APSK and QPSK.
// The expected codeword order is computed here from the interleaver's
// definition (codeword bit c*R + r is bit c of symbol r, R = N/nbits; QPSK
// in arrival order). Checks: every output soft bit matches, first/last
// flags mark the frame edges, frames_out counts the frames, no overrun.
module tb_bit_deinterleaver;
  import dvbs2_pkg::*;
  localparam int N = 16200;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  mod_t cfg_mod;
  logic [16:0] cfg_frame_bits = 17'(N);
  logic in_valid = 0;
  logic signed [LLRW-1:0] in_llr [5];
  logic [2:0] in_nbits;
  sym_tag_t in_tag;
  logic out_valid, out_first, out_last, overrun;
  logic signed [LLRW-1:0] out_llr;
  logic [15:0] frames_out;
  bit_deinterleaver dut (.*);
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

  int exp_q [$];
  int bad_val = 0, bad_flag = 0, nout = 0, pos = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    e = exp_q.pop_front();
    if (int'(out_llr) != e) bad_val++;
    if (out_first != (pos == 0) || out_last != (pos == N - 1)) bad_flag++;
    pos = (pos == N - 1) ? 0 : pos + 1;
    nout++;
  end

  task automatic frame(input mod_t m);
    int nb, r;
    int v [N];
    nb = bits_per_sym(m);
    r = N / nb;
    for (int s = 0; s < r; s++) begin
      @(negedge clk);
      cfg_mod = m;
      in_valid = 1; in_nbits = 3'(nb);
      in_tag = '0; in_tag.kind = SYM_DATA; in_tag.idx = 16'(s); in_tag.data_first = (s == 0);
      for (int b = 0; b < 5; b++) begin
        in_llr[b] = LLRW'($urandom_range(0, 62) - 31);
        if (b < nb) v[s * nb + b] = int'(in_llr[b]);
      end
    end
    // expected codeword order
    for (int j = 0; j < N; j++)
      if (m == MOD_QPSK) exp_q.push_back(v[j]);
      else exp_q.push_back(v[(j % r) * nb + j / r]);
    // a few non-data symbols between frames
    for (int k = 0; k < 90; k++) begin
      @(negedge clk);
      in_tag = '0; in_tag.kind = SYM_HEADER;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    cfg_mod = MOD_16APSK;
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame(MOD_16APSK);
    frame(MOD_16APSK);
    // wait for the frames to be read before the modulation changes
    repeat (2 * N + 100) @(negedge clk);
    frame(MOD_8PSK);
    repeat (N + 100) @(negedge clk);
    frame(MOD_32APSK);
    repeat (N + 100) @(negedge clk);
    frame(MOD_QPSK);
    repeat (N + 100) @(negedge clk);
    $display("soft bits out %0d, value errors %0d, flag errors %0d, frames %0d", nout, bad_val, bad_flag, frames_out);
    check(bad_val == 0 && nout == 5 * N, "deinterleaved soft bits in codeword order");
    check(bad_flag == 0, "first/last flags at the frame edges");
    check(frames_out == 16'd5, "frame counter");
    check(!overrun, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
