// opb_xsb300_tb: end-to-end test of the frame-buffer peripheral at its
// default size (640x480, 8-bit pixels, 2^20-word SRAM).
//
// The testbench plays the processor on the OPB and the SRAM chip on the
// board (sram_model). It
//  1. checks 32-, 16- and 8-bit writes and reads against a byte-level
//     reference memory, and the contention-free acknowledge latencies
//     (2/3 clocks for 16/32-bit writes, 4/5 for reads);
//  2. runs the picture workload: a 640x480 RGB332 picture made of colour
//     runs is run-length coded as (colour, count) byte pairs, then decoded
//     the way the receiving program does it, one byte write per pixel
//     from the frame base, after the screen has been cleared with byte
//     writes of zero; all this happens while video is being displayed, so
//     processor accesses are stalled by video reads;
//  3. reads back part of the picture with 32-bit reads;
//  4. waits for the next vertical sync and compares every visible pixel of
//     a whole frame on the DAC outputs with the picture.
// Mechanisms counted (each must occur): video stalls of processor accesses,
// a video request during the second half of a 32-bit access, each access
// size and direction, the clearing of the read register after a read, and
// horizontal and vertical blanking intervals.
module opb_xsb300_tb;
  import xsb_pkg::*;

  localparam int W = 640, H = 480;
  localparam logic [31:0] VGA_START = 32'h0080_0000;

  logic        clk = 1'b0, pix_clk = 1'b0, rst = 1'b1;
  logic [31:0] OPB_ABus = '0, OPB_DBus = '0;
  logic [3:0]  OPB_BE = '0;
  logic        OPB_RNW = 1'b0, OPB_select = 1'b0, OPB_seqAddr = 1'b0;
  logic [31:0] UIO_DBus;
  logic        UIO_errAck, UIO_retry, UIO_toutSup, UIO_xferAck;
  logic [19:0] PB_A;
  logic        PB_UB_N, PB_LB_N, PB_WE_N, PB_OE_N, RAM_CE_N;
  wire  [15:0] PB_D;
  logic        VIDOUT_CLK, VIDOUT_BLANK_N, VIDOUT_HSYNC_N, VIDOUT_VSYNC_N;
  logic [9:0]  VIDOUT_RCR, VIDOUT_GY, VIDOUT_BCB;

  int checks = 0, failures = 0;

  opb_xsb300 dut (
    .OPB_Clk(clk), .OPB_Rst(rst), .OPB_ABus, .OPB_BE, .OPB_DBus, .OPB_RNW,
    .OPB_select, .OPB_seqAddr, .pixel_clock(pix_clk), .UIO_DBus, .UIO_errAck,
    .UIO_retry, .UIO_toutSup, .UIO_xferAck, .PB_A, .PB_UB_N, .PB_LB_N,
    .PB_WE_N, .PB_OE_N, .RAM_CE_N, .VIDOUT_CLK, .VIDOUT_RCR, .VIDOUT_GY,
    .VIDOUT_BCB, .VIDOUT_BLANK_N, .VIDOUT_HSYNC_N, .VIDOUT_VSYNC_N, .PB_D
  );

  sram_model #(.AW(20)) u_sram (
    .A(PB_A), .D(PB_D), .CE_N(RAM_CE_N), .OE_N(PB_OE_N), .WE_N(PB_WE_N),
    .UB_N(PB_UB_N), .LB_N(PB_LB_N)
  );

  initial forever begin
    #10 clk = 1'b1; pix_clk = ~pix_clk;
    #10 clk = 1'b0;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- reference memory (bytes, frame-buffer relative)
  logic [7:0] ref_mem [int];
  function automatic logic [7:0] ref_byte(int a);
    return ref_mem.exists(a) ? ref_mem[a] : 8'h00;
  endfunction

  // ---------------- OPB master
  int n_wr[3] = '{0, 0, 0}, n_rd[3] = '{0, 0, 0};   // by size: 8, 16, 32
  int min_lat_wr[3] = '{99, 99, 99}, min_lat_rd[3] = '{99, 99, 99};
  int stalled = 0, n_cleared = 0;
  logic idle_between = 1'b0;

  function automatic int size_idx(logic [3:0] be);
    return (be == 4'hF) ? 2 : ($countones(be) == 2) ? 1 : 0;
  endfunction

  task automatic opb_xfer(input logic [31:0] a, input logic [3:0] be,
                          input logic rnw, input logic [31:0] wd,
                          output logic [31:0] rd);
    int lat, sz;
    OPB_ABus = a; OPB_BE = be; OPB_RNW = rnw; OPB_DBus = wd;
    OPB_select = 1'b1;
    lat = 0;
    #1;
    while (!UIO_xferAck) begin
      @(negedge clk);
      lat++;
      #1;
      if (lat > 200) begin
        failures++;
        $display("no acknowledge");
        break;
      end
    end
    rd = UIO_DBus;
    sz = size_idx(be);
    if (rnw) begin
      n_rd[sz]++;
      if (lat < min_lat_rd[sz]) min_lat_rd[sz] = lat;
      if (lat > (sz == 2 ? 5 : 4)) stalled++;
    end else begin
      n_wr[sz]++;
      if (lat < min_lat_wr[sz]) min_lat_wr[sz] = lat;
      if (lat > (sz == 2 ? 3 : 2)) stalled++;
    end
    @(negedge clk);
    if (idle_between) begin
      OPB_select = 1'b0;
      OPB_ABus = '0;
      // the read register must be clear again once the transfer is over
      #1;
      check(UIO_DBus == '0 && !UIO_xferAck, "read register cleared");
      if (rnw) n_cleared++;
      @(negedge clk);
    end
  endtask

  task automatic write8(input int off, input logic [7:0] b);
    logic [31:0] dummy;
    opb_xfer(VGA_START + off, 4'b1000 >> (off % 4), 1'b0, {4{b}}, dummy);
    ref_mem[off] = b;
  endtask

  task automatic write16(input int off, input logic [15:0] h);
    logic [31:0] dummy;
    opb_xfer(VGA_START + off, (off % 4 == 0) ? 4'b1100 : 4'b0011, 1'b0,
             {2{h}}, dummy);
    ref_mem[off] = h[15:8]; ref_mem[off + 1] = h[7:0];
  endtask

  task automatic write32(input int off, input logic [31:0] w);
    logic [31:0] dummy;
    opb_xfer(VGA_START + off, 4'b1111, 1'b0, w, dummy);
    for (int i = 0; i < 4; i++) ref_mem[off + i] = w[31 - 8 * i -: 8];
  endtask

  // read with byte enables and compare the enabled lanes with the reference
  task automatic read_check(input int off, input logic [3:0] be);
    logic [31:0] rd;
    int base;
    base = off & ~3;
    opb_xfer(VGA_START + off, be, 1'b1, '0, rd);
    for (int i = 0; i < 4; i++)
      if (be[3 - i]) begin
        check(rd[31 - 8 * i -: 8] == ref_byte(base + i), "read data");
        if (rd[31 - 8 * i -: 8] != ref_byte(base + i) && failures < 10)
          $display("  offset %0d be %b got %h expected byte %0d = %h", off, be, rd,
                   i, ref_byte(base + i));
      end
  endtask

  // ---------------- monitors
  int hblanks = 0, vblanks = 0, vid_in_second_half = 0;
  logic hs_q = 1'b1, vs_q = 1'b1;
  always @(negedge pix_clk) begin
    if (VIDOUT_HSYNC_N && !hs_q) hblanks++;
    if (VIDOUT_VSYNC_N && !vs_q) vblanks++;
    hs_q <= VIDOUT_HSYNC_N;
    vs_q <= VIDOUT_VSYNC_N;
  end
  always @(negedge clk)
    if (!rst && dut.video_req &&
        (dut.u_memoryctrl.state inside {MC_WR_HI, MC_RD_HI}))
      vid_in_second_half++;

  // ---------------- picture
  logic [7:0] img [W * H];
  byte unsigned rle[$];

  task automatic make_picture();
    int k, run;
    logic [7:0] c;
    k = 0;
    while (k < W * H) begin
      c   = 8'($urandom);
      run = 1 + ($urandom % 119);
      for (int i = 0; i < run && k < W * H; i++) img[k++] = c;
    end
    // run-length code: (colour, count) pairs, runs capped at 120
    k = 0;
    while (k < W * H) begin
      run = 1;
      while (k + run < W * H && img[k + run] == img[k] && run < 120) run++;
      rle.push_back(img[k]);
      rle.push_back(8'(run));
      k += run;
    end
  endtask

  // ---------------- main
  initial begin
    int z, pix, mism, errs;
    logic [7:0] col, cnt, exp_b;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);

    // 1. access sizes
    idle_between = 1'b1;
    for (int i = 0; i < 200; i++) begin
      int off, kind;
      off  = 4 * ($urandom % 4096) + 400000;
      kind = int'($urandom % 3);
      unique case (kind)
        0: write32(off, $urandom);
        1: write16(off + 2 * ($urandom % 2), 16'($urandom));
        default: write8(off + ($urandom % 4), 8'($urandom));
      endcase
      read_check(off, 4'b1111);
      read_check(off, 4'b1100);
      read_check(off + 2, 4'b0011);
      kind = int'($urandom % 4);
      read_check(off + kind, 4'b1000 >> kind);
    end
    check(min_lat_wr[1] == 2 && min_lat_wr[2] == 3 && min_lat_wr[0] == 2,
          "write latency");
    check(min_lat_rd[1] == 4 && min_lat_rd[2] == 5 && min_lat_rd[0] == 4,
          "read latency");
    $display("min latencies wr8/16/32 %0d %0d %0d rd %0d %0d %0d",
             min_lat_wr[0], min_lat_wr[1], min_lat_wr[2],
             min_lat_rd[0], min_lat_rd[1], min_lat_rd[2]);

    // 2. picture workload
    idle_between = 1'b0;
    make_picture();
    $display("picture: %0d pixels coded in %0d bytes", W * H, rle.size());
    for (int q = 0; q < W * H; q++) write8(q, 8'h00);      // clear screen
    z = 0;
    while (rle.size() >= 2) begin
      col = rle.pop_front();
      cnt = rle.pop_front();
      for (int j = 0; j < int'(cnt); j++) write8(z++, col);
    end
    check(z == W * H, "decoded pixel count");

    // 3. read back one line in every 16 with 32-bit reads
    idle_between = 1'b1;
    errs = 0;
    for (int l = 0; l < H; l += 16)
      for (int x = 0; x < W; x += 4) begin
        logic [31:0] rd;
        opb_xfer(VGA_START + l * W + x, 4'b1111, 1'b1, '0, rd);
        checks++;
        if (rd != {img[l*W+x], img[l*W+x+1], img[l*W+x+2], img[l*W+x+3]}) begin
          failures++; errs++;
        end
      end
    if (errs != 0) $display("readback mismatches %0d", errs);
    OPB_select = 1'b0;

    // 4. one whole frame on the DAC outputs
    @(negedge VIDOUT_VSYNC_N);
    pix = 0; mism = 0;
    while (pix < W * H) begin
      @(negedge pix_clk);
      if (VIDOUT_BLANK_N) begin
        exp_b = img[pix];
        checks++;
        if (!(VIDOUT_RCR == {exp_b[7:5], 7'b0} && VIDOUT_GY == {exp_b[4:2], 7'b0}
              && VIDOUT_BCB == {exp_b[1:0], 8'b0})) begin
          failures++; mism++;
          if (mism < 5) $display("pixel %0d: %h %h %h expected %h", pix,
                                 VIDOUT_RCR, VIDOUT_GY, VIDOUT_BCB, exp_b);
        end
        pix++;
      end
    end

    // mechanism counts
    $display("writes 8/16/32: %0d %0d %0d  reads 8/16/32: %0d %0d %0d",
             n_wr[0], n_wr[1], n_wr[2], n_rd[0], n_rd[1], n_rd[2]);
    $display("stalled accesses %0d, video in second half %0d, hblanks %0d, vblanks %0d",
             stalled, vid_in_second_half, hblanks, vblanks);
    foreach (n_wr[i]) check(n_wr[i] > 0 && n_rd[i] > 0, "access size used");
    check(stalled > 0, "video stall occurred");
    check(n_cleared > 0, "read register clear occurred");
    check(vid_in_second_half > 0, "video during second half occurred");
    check(hblanks > 480 && vblanks > 1, "blanking intervals occurred");
    check(u_sram.bus_fights == 0, "SRAM bus fights");
    check(UIO_errAck == 0 && UIO_retry == 0 && UIO_toutSup == 0, "unused OPB outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
