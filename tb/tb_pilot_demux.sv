// tb_pilot_demux: self-checking test of the pilot demultiplexer.
// A random mix of header, data and pilot symbols is sent; every pilot must
// appear on the pilot port with correct first/last flags, every other symbol
// on the payload port with its tag, both in order and nothing lost.
module tb_pilot_demux;
  import dvbs2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0;
  cplx_t in;
  sym_tag_t in_tag;
  logic pilot_valid, pilot_first, pilot_last, pay_valid;
  cplx_t pilot, pay;
  sym_tag_t pay_tag;
  pilot_demux dut (.*);
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
  cplx_t pq [$];
  cplx_t dq [$];
  sym_tag_t tq [$];
  bit fq [$];
  bit lq [$];
  int np = 0, nd = 0, bad = 0;
  always @(posedge clk) if (rst_n) begin
    if (pilot_valid) begin
      np++;
      if (pilot != pq.pop_front() || pilot_first != fq.pop_front() || pilot_last != lq.pop_front()) bad++;
    end
    if (pay_valid) begin
      nd++;
      if (pay != dq.pop_front() || pay_tag != tq.pop_front()) bad++;
    end
  end
  initial begin
    int k;
    repeat (3) @(posedge clk);
    rst_n = 1;
    k = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in = $urandom;
      in_tag = '0;
      in_tag.kind = sym_kind_t'($urandom_range(0, 3));
      if (in_tag.kind == SYM_PILOT) begin
        in_tag.idx = 16'(k % 36);
        in_tag.pilot_last = (k % 36 == 35);
      end else in_tag.idx = 16'($urandom);
      if (in_valid) begin
        if (in_tag.kind == SYM_PILOT) begin
          pq.push_back(in); fq.push_back(k % 36 == 0); lq.push_back(k % 36 == 35); k++;
        end else begin
          dq.push_back(in); tq.push_back(in_tag);
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    $display("pilots %0d, payload %0d, mismatches %0d", np, nd, bad);
    check(bad == 0, "symbols routed with their flags");
    check(np == k && pq.size() == 0 && dq.size() == 0, "nothing lost");
    check(np > 300 && nd > 1000, "both ports used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
