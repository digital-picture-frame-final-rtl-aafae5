// vga_timing_tb: checks the VGA timing generator at its default 640x480
// timing against a closed-form description of every output.
//
// After reset the testbench counts pixel clocks n, with p = n mod 800 and
// L = (n / 800) mod 524, and compares on every clock from the second frame
// on: h_sync_delay (high for p = 658..753), v_sync_delay (lines 491..492,
// delayed two clocks), blank (high outside p = 0..639 / lines 0..479) and the
// frame-buffer address (L*640 + 3 + p on visible pixels, held at the next
// line's base in horizontal blanking, zero in vertical blanking). It also
// counts visible pixels per frame and the frame period.
module vga_timing_tb;
  import xsb_pkg::*;

  localparam longint HT = 800, VT = 524;

  logic        clk = 1'b0, rst = 1'b1;
  logic        hs, vs, blank;
  logic [19:0] addr;
  int          checks = 0, failures = 0;

  vga_timing dut (
    .pixel_clock(clk), .reset(rst), .h_sync_delay(hs), .v_sync_delay(vs),
    .blank(blank), .vga_ram_read_address(addr)
  );

  always #20 clk = ~clk;

  function automatic logic hs_at(longint n);
    int p;
    if (n < 0) return 1'b0;
    p = int'(n % HT);
    return (p >= 656 && p <= 751);
  endfunction

  function automatic logic vs_at(longint n);
    int p, l;
    if (n < 0) return 1'b0;
    p = int'(n % HT); l = int'((n / HT) % VT);
    return (l == 491 || l == 492);
  endfunction

  function automatic logic blank_at(longint n);
    int p, l;
    logic hb, vb;
    if (n < 1) return 1'b0;
    n = n - 1;
    p = int'(n % HT); l = int'((n / HT) % VT);
    hb = (p >= 639 && p <= 798);
    vb = (l == 479 && p == 799) || (l >= 480 && l <= 522) || (l == 523 && p <= 798);
    return hb | vb;
  endfunction

  function automatic int addr_at(longint n);
    int p, l;
    p = int'(n % HT); l = int'((n / HT) % VT);
    if (l == 523 && p >= 797) return p - 797;
    if (l <= 479 && p <= 636) return l * 640 + 3 + p;
    if (l <= 478 && p <= 796) return (l + 1) * 640;
    if (l <= 478) return (l + 1) * 640 + p - 797;
    if (l == 479 && p <= 797) return 307200;
    return 0;
  endfunction

  longint n;
  int     visible, frame_starts;
  longint last_vs_rise;
  logic   vs_q;

  initial begin
    n = 1; visible = 0; frame_starts = 0; last_vs_rise = -1; vs_q = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (n < longint'(HT) * VT * 2 + 10) begin
      @(negedge clk);
      if (n >= longint'(HT) * VT) begin
        checks++;
        if (hs !== hs_at(n - 2)) begin
          failures++;
          if (failures < 10) $display("hsync n=%0d got %b", n, hs);
        end
        checks++;
        if (vs !== vs_at(n - 2)) begin
          failures++;
          if (failures < 10) $display("vsync n=%0d got %b", n, vs);
        end
        checks++;
        if (blank !== blank_at(n)) begin
          failures++;
          if (failures < 10) $display("blank n=%0d got %b", n, blank);
        end
        checks++;
        if (int'(addr) != addr_at(n)) begin
          failures++;
          if (failures < 10) $display("addr n=%0d p=%0d l=%0d got %0d exp %0d",
                                      n, n % HT, (n / HT) % VT, addr, addr_at(n));
        end
        if (n < longint'(HT) * VT * 2 && !blank) visible++;
      end
      if (vs && !vs_q) begin
        if (last_vs_rise >= 0) begin
          checks++;
          if (n - last_vs_rise != longint'(HT) * VT) failures++;
        end
        last_vs_rise = n;
        frame_starts++;
      end
      vs_q = vs;
      n++;
    end
    checks++;
    if (visible != 640 * 480) begin
      failures++;
      $display("visible pixels per frame %0d", visible);
    end
    checks++;
    if (frame_starts != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (int'(HT * VT * 3)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
