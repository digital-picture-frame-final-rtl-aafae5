// xsb_pkg: types and constants shared by the frame-buffer peripheral.
//
// The frame buffer stores one pixel per byte in RGB332 form: red in bits
// 7:5, green in bits 4:2, blue in bits 1:0. Two pixels share one 16-bit
// SRAM word, the even pixel in the upper byte. The 640x480 at 60 Hz timing
// numbers below are the defaults of the timing generator; the vertical total
// of 524 lines is what the design uses (the common VESA figure is 525).
// The sequencer state type belongs to the SRAM arbiter.
package xsb_pkg;

  // Default video timing, in pixel clocks and lines
  localparam int unsigned H_ACTIVE_D      = 640;
  localparam int unsigned H_FRONT_PORCH_D = 16;
  localparam int unsigned H_BACK_PORCH_D  = 48;
  localparam int unsigned H_TOTAL_D       = 800;
  localparam int unsigned V_ACTIVE_D      = 480;
  localparam int unsigned V_FRONT_PORCH_D = 11;
  localparam int unsigned V_BACK_PORCH_D  = 31;
  localparam int unsigned V_TOTAL_D       = 524;
  // Pixels by which the frame-buffer address runs ahead of the display
  localparam int unsigned SRAM_DELAY_D    = 3;

  localparam int unsigned SRAM_AW = 20;  // SRAM word address width
  localparam int unsigned SRAM_DW = 16;  // SRAM data width
  localparam int unsigned DAC_W   = 10;  // video DAC code width

  // One RGB332 pixel
  typedef struct packed {
    logic [2:0] r;
    logic [2:0] g;
    logic [1:0] b;
  } rgb332_t;

  // Main sequencer of the SRAM arbiter. The second SRAM read of a 32-bit
  // read runs in RD_HI..RD_HI3 while a separate two-stage pipeline follows
  // the first read; RD_WAIT waits on that pipeline for a 16-bit read.
  typedef enum logic [2:0] {
    MC_IDLE,
    MC_COMMON,   // first SRAM cycle (stalls while video owns the SRAM)
    MC_WR_HI,    // second half of a 32-bit write
    MC_RD_HI,    // second half of a 32-bit read issued
    MC_RD_HI2,   // its data in the pad register
    MC_RD_HI3,   // its data latched into the low OPB half
    MC_RD_WAIT,  // single-cycle read waits for its data
    MC_XFER      // acknowledge to the OPB
  } mc_state_t;

endpackage
