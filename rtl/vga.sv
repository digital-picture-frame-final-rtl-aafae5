// vga: frame-buffer video generator, one byte (RGB332) per pixel.
//
// vga_timing supplies syncs, blanking and a pixel address into the frame
// buffer. Two pixels share one 16-bit SRAM word, so a word is requested
// whenever the pixel address is even: the request goes to the SRAM arbiter
// on the system clock (clk) as video_req, and the word address is the pixel
// address shifted right by one. The word arrives on video_data (latched by
// the peripheral two system clocks after the request) and is loaded into a
// 16-bit shift register two pixel clocks after the request was raised; the
// next pixel clock shifts the low byte up. The upper byte of the shift
// register is the current pixel: its fields go to the top bits of
// the 10-bit DAC codes (red 3 bits, green 3 bits, blue 2 bits, the rest 0).
// Colours, syncs (inverted to active low) and blanking (inverted) pass
// through one more pixel-clock register on the way out; VIDOUT_CLK is the
// pixel clock itself.
//
// Clocking: pix_clk is half of clk and rises together with it. video_req is
// pix_clk AND the even-address flag, sampled on clk, which yields exactly one
// clk-cycle request per even pixel; sampling a clock as data is how the
// original design crosses into the system-clock domain, and it relies on the two
// clocks being phase locked. As in the original design, words are requested during
// blanking too.
//
// Overall latency from vga_timing's address to the DAC pins is four pixel
// clocks; with SRAM_DELAY = 3 this puts pixel 0 of a line on the first pixel
// clock with VIDOUT_BLANK_N high.
// The resets on the pipeline registers are this design's addition (the
// original leaves them without reset); everything else follows the original
// design.
module vga
  import xsb_pkg::*;
#(
  parameter int unsigned H_ACTIVE      = H_ACTIVE_D,
  parameter int unsigned H_FRONT_PORCH = H_FRONT_PORCH_D,
  parameter int unsigned H_BACK_PORCH  = H_BACK_PORCH_D,
  parameter int unsigned H_TOTAL       = H_TOTAL_D,
  parameter int unsigned V_ACTIVE      = V_ACTIVE_D,
  parameter int unsigned V_FRONT_PORCH = V_FRONT_PORCH_D,
  parameter int unsigned V_BACK_PORCH  = V_BACK_PORCH_D,
  parameter int unsigned V_TOTAL       = V_TOTAL_D,
  parameter int unsigned SRAM_DELAY    = SRAM_DELAY_D
) (
  input  logic               clk,
  input  logic               pix_clk,
  input  logic               rst,
  input  logic [SRAM_DW-1:0] video_data,
  output logic [SRAM_AW-1:0] video_addr,
  output logic               video_req,
  output logic               VIDOUT_CLK,
  output logic [DAC_W-1:0]   VIDOUT_RCR,
  output logic [DAC_W-1:0]   VIDOUT_GY,
  output logic [DAC_W-1:0]   VIDOUT_BCB,
  output logic               VIDOUT_BLANK_N,
  output logic               VIDOUT_HSYNC_N,
  output logic               VIDOUT_VSYNC_N
);

  logic               hsync, vsync, blank;
  logic [SRAM_AW-1:0] pix_addr;
  logic               vreq, vreq_1, load_video_word;
  logic [SRAM_DW-1:0] vga_shreg;
  rgb332_t            pixel;

  vga_timing #(
    .H_ACTIVE(H_ACTIVE), .H_FRONT_PORCH(H_FRONT_PORCH),
    .H_BACK_PORCH(H_BACK_PORCH), .H_TOTAL(H_TOTAL),
    .V_ACTIVE(V_ACTIVE), .V_FRONT_PORCH(V_FRONT_PORCH),
    .V_BACK_PORCH(V_BACK_PORCH), .V_TOTAL(V_TOTAL),
    .SRAM_DELAY(SRAM_DELAY)
  ) u_timing (
    .pixel_clock          (pix_clk),
    .reset                (rst),
    .h_sync_delay         (hsync),
    .v_sync_delay         (vsync),
    .blank                (blank),
    .vga_ram_read_address (pix_addr)
  );

  // A word is fetched for every even pixel address
  assign vreq       = ~pix_addr[0];
  assign video_addr = {1'b0, pix_addr[SRAM_AW-1:1]};

  // Request in the system-clock domain: one clk cycle per even pixel
  always_ff @(posedge clk or posedge rst) begin
    if (rst) video_req <= 1'b0;
    else     video_req <= pix_clk & vreq;
  end

  // Load the fetched word two pixel clocks after the request, else shift
  always_ff @(posedge pix_clk or posedge rst) begin
    if (rst) begin
      vreq_1          <= 1'b0;
      load_video_word <= 1'b0;
      vga_shreg       <= '0;
    end else begin
      vreq_1          <= vreq;
      load_video_word <= vreq_1;
      if (load_video_word) vga_shreg <= video_data;
      else                 vga_shreg <= {vga_shreg[7:0], 8'h00};
    end
  end

  assign pixel = rgb332_t'(vga_shreg[15:8]);

  // Output registers
  always_ff @(posedge pix_clk or posedge rst) begin
    if (rst) begin
      VIDOUT_RCR     <= '0;
      VIDOUT_GY      <= '0;
      VIDOUT_BCB     <= '0;
      VIDOUT_HSYNC_N <= 1'b1;
      VIDOUT_VSYNC_N <= 1'b1;
      VIDOUT_BLANK_N <= 1'b1;
    end else begin
      VIDOUT_RCR     <= {pixel.r, 7'b0};
      VIDOUT_GY      <= {pixel.g, 7'b0};
      VIDOUT_BCB     <= {pixel.b, 8'b0};
      VIDOUT_HSYNC_N <= ~hsync;
      VIDOUT_VSYNC_N <= ~vsync;
      VIDOUT_BLANK_N <= ~blank;
    end
  end

  assign VIDOUT_CLK = pix_clk;

endmodule
