// opb_xsb300: OPB slave that turns the board SRAM into a VGA frame buffer.
//
// The processor writes pixels (one RGB332 byte each, 640 per line, frame
// starting at C_BASEADDR) into the board's 16-bit SRAM through the OPB; the
// video generator reads them back continuously and drives the video DAC.
// The bridge holds three parts:
//   vga        - timing, video word requests, pixel shift register, DAC pins
//   memoryctrl - arbiter/sequencer; video has priority over the processor
//   pad_io     - registered SRAM pins
// Glue here: the address decode (OPB_ABus[31:20] equal to C_BASEADDR[31:20]),
// one register each for the OPB address, byte enables, write data and RNW;
// the SRAM address multiplexer (video word address during video cycles,
// otherwise byte address bits 20:2 and then bit 1 OR hihalf); the half-word
// write data multiplexer and byte-lane enables (OPB bit 31 is the lowest
// byte address, so the even half word is OPB bits 31:16 and its even byte is
// the SRAM upper byte); the video data register; and the 32-bit OPB read
// register, zero except while returning data. A read of fewer than four
// bytes returns the addressed half word on both OPB halves.
//
// Timing: the OPB address and controls are registered, so a transfer is
// acknowledged (UIO_xferAck, one clock) 2/3 clocks after the select for a
// 16/32-bit write and 4/5 clocks for a 16/32-bit read, plus one clock for each
// clock the video generator holds the SRAM. The master is expected to drop
// OPB_select or start a new transfer after the acknowledge.
// pixel_clock must be OPB_Clk / 2, phase aligned with it. The structure and
// all address/lane conventions follow the original design; the video data register
// gets a reset here, which the original's does not have.
module opb_xsb300
  import xsb_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h0080_0000,
  parameter logic [31:0] C_HIGHADDR = 32'h00FF_FFFF
) (
  input  logic               OPB_Clk,
  input  logic               OPB_Rst,
  input  logic [31:0]        OPB_ABus,
  input  logic [3:0]         OPB_BE,
  input  logic [31:0]        OPB_DBus,
  input  logic               OPB_RNW,
  input  logic               OPB_select,
  input  logic               OPB_seqAddr,
  input  logic               pixel_clock,
  output logic [31:0]        UIO_DBus,
  output logic               UIO_errAck,
  output logic               UIO_retry,
  output logic               UIO_toutSup,
  output logic               UIO_xferAck,
  output logic [SRAM_AW-1:0] PB_A,
  output logic               PB_UB_N,
  output logic               PB_LB_N,
  output logic               PB_WE_N,
  output logic               PB_OE_N,
  output logic               RAM_CE_N,
  output logic               VIDOUT_CLK,
  output logic [DAC_W-1:0]   VIDOUT_RCR,
  output logic [DAC_W-1:0]   VIDOUT_GY,
  output logic [DAC_W-1:0]   VIDOUT_BCB,
  output logic               VIDOUT_BLANK_N,
  output logic               VIDOUT_HSYNC_N,
  output logic               VIDOUT_VSYNC_N,
  inout  wire  [SRAM_DW-1:0] PB_D
);

  logic [SRAM_AW-1:0] video_addr, addr_mux;
  logic [SRAM_DW-1:0] video_data, rdata, wdata_mux;
  logic               video_req, video_ce;
  logic               cs, onecycle, videocycle, hihalf, second_half;
  logic               rce0, rce1, rreset, xfer, pb_wr, pb_rd, sram_ce;
  logic               rnw;
  logic [23:0]        addr;
  logic [3:0]         be;
  logic [31:0]        wdata;
  logic [1:0]         pb_bytesel;

  vga u_vga (
    .clk            (OPB_Clk),
    .pix_clk        (pixel_clock),
    .rst            (OPB_Rst),
    .video_data     (video_data),
    .video_addr     (video_addr),
    .video_req      (video_req),
    .VIDOUT_CLK     (VIDOUT_CLK),
    .VIDOUT_RCR     (VIDOUT_RCR),
    .VIDOUT_GY      (VIDOUT_GY),
    .VIDOUT_BCB     (VIDOUT_BCB),
    .VIDOUT_BLANK_N (VIDOUT_BLANK_N),
    .VIDOUT_HSYNC_N (VIDOUT_HSYNC_N),
    .VIDOUT_VSYNC_N (VIDOUT_VSYNC_N)
  );

  memoryctrl u_memoryctrl (
    .rst        (OPB_Rst),
    .clk        (OPB_Clk),
    .cs         (cs),
    .select0    (OPB_select),
    .rnw        (rnw),
    .vreq       (video_req),
    .onecycle   (onecycle),
    .videocycle (videocycle),
    .hihalf     (hihalf),
    .pb_wr      (pb_wr),
    .pb_rd      (pb_rd),
    .xfer       (xfer),
    .ce0        (rce0),
    .ce1        (rce1),
    .rres       (rreset),
    .video_ce   (video_ce)
  );

  pad_io u_pad_io (
    .clk       (OPB_Clk),
    .rst       (OPB_Rst),
    .PB_A      (PB_A),
    .PB_UB_N   (PB_UB_N),
    .PB_LB_N   (PB_LB_N),
    .PB_WE_N   (PB_WE_N),
    .PB_OE_N   (PB_OE_N),
    .RAM_CE_N  (RAM_CE_N),
    .PB_D      (PB_D),
    .pb_addr   (addr_mux),
    .pb_ub     (pb_bytesel[1]),
    .pb_lb     (pb_bytesel[0]),
    .pb_wr     (pb_wr),
    .pb_rd     (pb_rd),
    .ram_ce    (sram_ce),
    .pb_dread  (rdata),
    .pb_dwrite (wdata_mux)
  );

  // Address decode: a window of 1 MB granularity at C_BASEADDR
  assign cs = OPB_select & (OPB_ABus[31:20] == C_BASEADDR[31:20]);

  // OPB request registers (synchronous reset)
  always_ff @(posedge OPB_Clk) begin
    if (OPB_Rst) begin
      rnw   <= 1'b0;
      addr  <= '0;
      be    <= '0;
      wdata <= '0;
    end else begin
      rnw   <= OPB_RNW;
      addr  <= OPB_ABus[23:0];
      be    <= OPB_BE;
      wdata <= OPB_DBus;
    end
  end

  assign sram_ce     = pb_rd | pb_wr;
  assign onecycle    = ~&be;
  assign second_half = addr[1] | hihalf;   // odd half word of the OPB word
  assign addr_mux    = videocycle ? video_addr : {addr[20:2], second_half};
  assign wdata_mux   = second_half ? wdata[15:0] : wdata[31:16];

  always_comb begin
    if (videocycle)          pb_bytesel = 2'b11;
    else if (pb_rd | pb_wr)  pb_bytesel = second_half ? be[1:0] : be[3:2];
    else                     pb_bytesel = 2'b00;
  end

  // Video data register
  always_ff @(posedge OPB_Clk or posedge OPB_Rst) begin
    if (OPB_Rst)       video_data <= '0;
    else if (video_ce) video_data <= rdata;
  end

  // OPB read register: ce0 loads both halves, ce1 the low half
  always_ff @(posedge OPB_Clk or posedge OPB_Rst) begin
    if (OPB_Rst) begin
      UIO_DBus <= '0;
    end else if (rreset) begin
      UIO_DBus <= '0;
    end else begin
      if (rce0 | rce1) UIO_DBus[15:0]  <= rdata;
      if (rce0)        UIO_DBus[31:16] <= rdata;
    end
  end

  assign UIO_errAck  = 1'b0;
  assign UIO_retry   = 1'b0;
  assign UIO_toutSup = 1'b0;
  assign UIO_xferAck = xfer;

endmodule
