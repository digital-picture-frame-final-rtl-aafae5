// vga_tb: checks the frame-buffer video generator at its default timing.
//
// The testbench plays the SRAM and bridge: when video_req is seen on a
// system-clock edge it looks up the requested word in a pattern memory
// (word a holds a hash of a) and presents it on video_data two system clocks
// later, the latency of the real memory path. After the first vertical sync
// every pixel clock with VIDOUT_BLANK_N high must show the next byte of the
// frame buffer in raster order (even pixel = upper byte) as RGB332 in the top
// bits of the DAC codes, for two whole frames. It also checks the number of
// video requests per frame (one per pixel clock with an even address), the
// sync pulse widths (96 pixel clocks, 2 lines) and the number of visible
// pixels per frame.
module vga_tb;
  import xsb_pkg::*;

  logic        clk = 1'b0, pix_clk = 1'b0, rst = 1'b1;
  logic [15:0] video_data;
  logic [19:0] video_addr;
  logic        video_req;
  logic        VIDOUT_CLK, VIDOUT_BLANK_N, VIDOUT_HSYNC_N, VIDOUT_VSYNC_N;
  logic [9:0]  VIDOUT_RCR, VIDOUT_GY, VIDOUT_BCB;
  int          checks = 0, failures = 0;

  vga dut (.*);

  // system clock 50 MHz, pixel clock half of it, rising edges aligned
  initial forever begin
    #10 clk = 1'b1; pix_clk = ~pix_clk;
    #10 clk = 1'b0;
  end

  function automatic logic [15:0] word_at(logic [19:0] a);
    return 16'((a * 32'd2654435761) >> 7) ^ 16'(a);
  endfunction

  // memory path model: request on clk edge n, data on video_data at edge n+3
  logic [19:0] a1, a2;
  logic        r1, r2;
  always @(posedge clk) begin
    if (r2) video_data <= word_at(a2);
    r2 <= r1; a2 <= a1;
    r1 <= video_req; a1 <= video_addr;
  end

  int     pix_in_frame, frames, reqs_frame, hs_width, vs_lines;
  logic   started, hs_q, vs_q, vs_check;
  longint pix_total;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // requests: counted on the system clock
  always @(posedge clk) if (!rst && video_req) reqs_frame++;

  initial begin
    logic [7:0]  exp_b;
    logic [19:0] waddr;
    video_data = '0; r1 = 0; r2 = 0; a1 = 0; a2 = 0;
    started = 0; frames = 0; pix_in_frame = 0;
    hs_width = 0; vs_lines = 0; hs_q = 1; vs_q = 1; vs_check = 0;
    pix_total = 0; reqs_frame = 0;
    repeat (3) @(negedge pix_clk);
    rst = 1'b0;
    while (frames < 3) begin
      @(negedge pix_clk);
      pix_total++;
      // vertical sync: start of frame
      if (!VIDOUT_VSYNC_N && vs_q) begin
        if (started) begin
          check(pix_in_frame == 640 * 480, "visible pixels per frame");
          // 480 lines x (320 even addresses + 160 held) + 44 lines all even
          check(reqs_frame == 265600, "video requests per frame");
          frames++;
        end
        started = 1;
        pix_in_frame = 0;
        reqs_frame = 0;
      end
      // horizontal sync width and line request count
      if (!VIDOUT_HSYNC_N) hs_width++;
      if (VIDOUT_HSYNC_N && !hs_q) begin
        check(hs_width == 96, "hsync width");
        hs_width = 0;
      end
      if (!VIDOUT_HSYNC_N && hs_q && !VIDOUT_VSYNC_N) vs_lines++;
      if (VIDOUT_VSYNC_N && !vs_q) begin
        if (vs_check) check(vs_lines == 2, "vsync lines");
        vs_check = 1;
        vs_lines = 0;
      end
      hs_q = VIDOUT_HSYNC_N;
      vs_q = VIDOUT_VSYNC_N;
      if (started && VIDOUT_BLANK_N && frames < 3) begin
        waddr = 20'(pix_in_frame / 2);
        exp_b = (pix_in_frame % 2 == 0) ? word_at(waddr)[15:8] : word_at(waddr)[7:0];
        check(VIDOUT_RCR == {exp_b[7:5], 7'b0} && VIDOUT_GY == {exp_b[4:2], 7'b0}
              && VIDOUT_BCB == {exp_b[1:0], 8'b0}, "pixel colour");
        pix_in_frame++;
      end
    end
    check(VIDOUT_CLK == pix_clk, "video clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800 * 524 * 2 * 5) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
