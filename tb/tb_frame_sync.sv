// tb_frame_sync: self-checking test of the frame synchroniser.
// Symbols of PL frames (pi/2-BPSK header with the SOF word and random PLS
// bits, QPSK data, pilot blocks after every 16th slot) follow a stretch of
// random symbols, with a carrier frequency offset of 0.01 cycles per symbol.
// Checks: lock is reached after the verify frames and not before; once
// locked, every symbol's tag (kind, index, first/last flags) matches the
// position the test generated it at; when the frames stop, lock is lost.
module tb_frame_sync;
  import dvbs2_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int S = 45;        // slots per frame (16APSK short frame)
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0;
  cplx_t in;
  logic [8:0] cfg_slots = 9'(S);
  logic cfg_pilots = 1;
  logic out_valid, locked, sof_hit;
  cplx_t out;
  sym_tag_t out_tag;
  logic [15:0] lock_events;
  frame_sync dut (.*);
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

  // expected tag of the symbol being sent, kept in a queue
  sym_tag_t exp_q [$];
  longint nsym = 0;
  task automatic send(input real re, input real im, input sym_tag_t t);
    real a;
    a = 2.0 * PI * 0.01 * real'(nsym);
    @(negedge clk);
    in_valid = 1;
    in.re = 16'($rtoi(3000.0 * (re * $cos(a) - im * $sin(a))));
    in.im = 16'($rtoi(3000.0 * (re * $sin(a) + im * $cos(a))));
    exp_q.push_back(t);
    nsym++;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic send_frame();
    sym_tag_t t;
    real r;
    int d;
    d = 0;
    for (int i = 0; i < 90; i++) begin
      bit b;
      b = (i < 26) ? SOF_WORD[25 - i] : 1'($urandom_range(0, 1));
      r = b ? -0.707 : 0.707;
      t = '0; t.kind = SYM_HEADER; t.idx = 16'(i); t.frame_first = (i == 0);
      send((i % 2 == 0) ? r : -r, r, t);
    end
    for (int s = 0; s < S; s++) begin
      for (int k = 0; k < 90; k++) begin
        t = '0; t.kind = SYM_DATA; t.idx = 16'(d); t.data_first = (d == 0); d++;
        send($urandom_range(0, 1) ? 0.707 : -0.707, $urandom_range(0, 1) ? 0.707 : -0.707, t);
      end
      if ((s + 1) % 16 == 0 && s + 1 < S)
        for (int k = 0; k < 36; k++) begin
          t = '0; t.kind = SYM_PILOT; t.idx = 16'(k); t.pilot_last = (k == 35);
          send(0.707, 0.707, t);
        end
    end
  endtask

  int tag_ok = 0, tag_bad = 0, locked_early = 0;
  int frames_sent = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    sym_tag_t e;
    e = exp_q.pop_front();
    if (out_tag.kind != SYM_UNLOCKED && e.kind != SYM_UNLOCKED) begin
      if (out_tag == e) tag_ok++;
      else begin
        if (tag_bad < 3) $display("  tag mismatch: got %p expected %p", out_tag, e);
        tag_bad++;
      end
    end
    if (locked && frames_sent < 2) locked_early++;
  end

  initial begin
    sym_tag_t t;
    t = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) send($urandom_range(0, 1) ? 0.707 : -0.707, $urandom_range(0, 1) ? 0.707 : -0.707, t);
    for (int f = 0; f < 5; f++) begin
      send_frame();
      frames_sent++;
      if (f == 3) check(locked, "locked within four frames");
    end
    check(locked_early == 0, "no lock before a frame was verified");
    check(lock_events == 1, "exactly one acquisition");
    check(tag_bad == 0 && tag_ok > 2 * 4302, "symbol tags follow the frame structure");
    // frames stop: lock must be dropped after the allowed misses
    for (int i = 0; i < 4 * 4302; i++) send($urandom_range(0, 1) ? 0.707 : -0.707, $urandom_range(0, 1) ? 0.707 : -0.707, t);
    check(!locked, "lock lost when frames stop");
    $display("tags checked %0d, mismatches %0d, lock events %0d", tag_ok, tag_bad, lock_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
