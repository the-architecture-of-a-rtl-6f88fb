// tb_pl_descrambler: self-checking test of the PL descrambler.
// The reference Gold sequence is produced here by stepping the two
// m-sequences one bit at a time (no look-ahead masks). Frames of a header
// and 3000 scrambled symbols are sent: header symbols must pass unchanged,
// data and pilot symbols must come out multiplied by conj(j^R(i)) with i
// counted from the first symbol after each header.
module tb_pl_descrambler;
  import dvbs2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0;
  cplx_t in;
  sym_tag_t in_tag;
  logic out_valid;
  cplx_t out;
  sym_tag_t out_tag;
  logic [1:0] out_r;
  pl_descrambler dut (.*);
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
  localparam int L = 3000;
  int rseq [L];
  initial begin
    bit x [];
    bit y [];
    int n;
    n = L + 131072 + 18;
    x = new[n]; y = new[n];
    for (int i = 0; i < 18; i++) begin x[i] = (i == 0); y[i] = 1; end
    for (int i = 0; i + 18 < n; i++) begin
      x[i+18] = x[i+7] ^ x[i];
      y[i+18] = y[i+10] ^ y[i+7] ^ y[i+5] ^ y[i];
    end
    for (int i = 0; i < L; i++) rseq[i] = 2 * int'(x[i+131072] ^ y[i+131072]) + int'(x[i] ^ y[i]);
  end

  int bad_hdr = 0, bad_data = 0, nd = 0;
  int er_q [$], ei_q [$];
  always @(posedge clk) if (rst_n && out_valid) begin
    logic signed [15:0] xr, xi;
    xr = out.re; xi = out.im;
    if (out_tag.kind == SYM_HEADER) begin
      if (xr != 16'(er_q.pop_front()) || xi != 16'(ei_q.pop_front())) bad_hdr++;
    end else begin
      if (xr != 16'(er_q.pop_front()) || xi != 16'(ei_q.pop_front())) bad_data++;
      nd++;
    end
  end

  initial begin
    int ar, ai, r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < 90; i++) begin
        @(negedge clk);
        ar = $urandom_range(0, 2000) - 1000; ai = $urandom_range(0, 2000) - 1000;
        in_valid = 1; in.re = 16'(ar); in.im = 16'(ai);
        in_tag = '0; in_tag.kind = SYM_HEADER; in_tag.idx = 16'(i);
        er_q.push_back(ar); ei_q.push_back(ai);
      end
      for (int i = 0; i < L; i++) begin
        @(negedge clk);
        ar = $urandom_range(0, 2000) - 1000; ai = $urandom_range(0, 2000) - 1000;
        in_valid = 1; in.re = 16'(ar); in.im = 16'(ai);
        in_tag = '0; in_tag.kind = (i % 1476 >= 1440) ? SYM_PILOT : SYM_DATA;
        // expected: multiply by conj(j^r)
        r = rseq[i];
        case (r)
          0: begin er_q.push_back(ar);  ei_q.push_back(ai);  end
          1: begin er_q.push_back(ai);  ei_q.push_back(-ar); end
          2: begin er_q.push_back(-ar); ei_q.push_back(-ai); end
          default: begin er_q.push_back(-ai); ei_q.push_back(ar); end
        endcase
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    $display("data/pilot symbols %0d, header errors %0d, data errors %0d", nd, bad_hdr, bad_data);
    check(bad_hdr == 0, "header symbols pass unchanged");
    check(bad_data == 0 && nd == 2 * L, "data and pilots descrambled with the Gold sequence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
