// memoryctrl_tb: checks the SRAM arbiter/sequencer cycle by cycle.
//
// Each transaction (16- or 32-bit, read or write) gets a random video request
// pattern drawn in advance. The expected behaviour is worked out from the
// pattern alone: the processor's first SRAM cycle t0 is the first cycle
// after the select cycle without a video request, the second half (32-bit
// only) the next such cycle t1 after t0; a read latches its first half two
// cycles after t0 (ce0) and its second half two cycles after t1 (ce1); the
// acknowledge comes one cycle after the last write cycle, or one cycle after
// the last latch of a read. Every output is compared in every cycle, and the
// contention-free latencies (2, 3, 4 and 5 cycles) are checked separately.
// Aborted transfers (select dropped early) must return to idle silently.
module memoryctrl_tb;
  import xsb_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic cs, select0, rnw, vreq, onecycle;
  logic videocycle, hihalf, pb_wr, pb_rd, xfer, ce0, ce1, rres, video_ce;
  int   checks = 0, failures = 0;
  int   stalls = 0, free_runs[4] = '{0, 0, 0, 0};

  memoryctrl dut (.*);

  always #10 clk = ~clk;

  // video request history for the video_ce check
  logic vhist[$];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One clock: apply inputs after the falling edge, check, then rise
  task automatic step(input logic c, input logic s, input logic v,
                      input logic exp_wr, input logic exp_rd_cpu,
                      input logic exp_hi, input logic exp_ce0,
                      input logic exp_ce1, input logic exp_xfer,
                      input logic check_en);
    cs = c; select0 = s; vreq = v;
    vhist.push_back(v);
    #1;
    if (check_en) begin
      check(pb_wr == exp_wr, "pb_wr");
      check(pb_rd == (v | exp_rd_cpu), "pb_rd");
      check(hihalf == exp_hi, "hihalf");
      check(ce0 == exp_ce0, "ce0");
      check(ce1 == exp_ce1, "ce1");
      check(xfer == exp_xfer && rres == exp_xfer, "xfer/rres");
      check(videocycle == v, "videocycle");
    end
    check(video_ce == ((vhist.size() >= 3) ? vhist[vhist.size() - 3] : 1'b0),
          "video_ce");
    @(negedge clk);
  endtask

  task automatic transaction(input logic is_read, input logic is32,
                             input int vprob);
    logic vr[64];
    int   t0, t1, tx, tce0, tce1, c;
    for (int i = 0; i < 64; i++) vr[i] = ($urandom % 100) < vprob;
    t0 = 1;
    while (vr[t0]) t0++;
    t1 = t0 + 1;
    while (vr[t1]) t1++;
    tce0 = is_read ? t0 + 2 : -1;
    tce1 = (is_read && is32) ? t1 + 2 : -1;
    if (!is_read) tx = is32 ? t1 + 1 : t0 + 1;
    else          tx = is32 ? t1 + 3 : t0 + 3;
    rnw = is_read; onecycle = ~is32;
    stalls += (is32 ? (t1 - 2) : (t0 - 1));
    for (c = 0; c <= tx; c++) begin
      step(1'b1, 1'b1, vr[c],
           !is_read && (c == t0 || (is32 && c == t1)),
           is_read && (c == t0 || (is32 && c == t1)),
           is32 && c == t1,
           c == tce0, c == tce1, c == tx, 1'b1);
    end
    if (tx == ((is_read ? 4 : 2) + (is32 ? 1 : 0))) free_runs[{is_read, is32}]++;
    // master drops select for one idle cycle
    step(1'b0, 1'b0, 1'($urandom % 2), 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0);
  endtask

  initial begin
    cs = 0; select0 = 0; vreq = 0; rnw = 0; onecycle = 1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    vhist.delete();
    // contention-free latencies first
    for (int k = 0; k < 4; k++) transaction(k[1], k[0], 0);
    for (int i = 0; i < 3000; i++)
      transaction(1'($urandom), 1'($urandom), (i % 3) * 25);
    // aborted transfer: select drops while waiting for video
    rnw = 1'b1; onecycle = 1'b0;
    step(1'b1, 1'b1, 1'b1, 0, 0, 0, 0, 0, 0, 1'b1);
    step(1'b1, 1'b1, 1'b1, 0, 0, 0, 0, 0, 0, 1'b1);
    step(1'b0, 1'b0, 1'b1, 0, 0, 0, 0, 0, 0, 1'b1);
    step(1'b0, 1'b0, 1'b0, 0, 0, 0, 0, 0, 0, 1'b1);
    transaction(1'b1, 1'b1, 0);
    foreach (free_runs[k]) check(free_runs[k] > 0, "contention-free latency");
    check(stalls > 100, "video stalls exercised");
    $display("video stall cycles %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
