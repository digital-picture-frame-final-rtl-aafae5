// vga_timing: fixed-resolution VGA timing and frame-buffer address generator.
//
// A pixel counter (0..H_TOTAL-1) and a line counter (0..V_TOTAL-1) run on
// the pixel clock. From them come horizontal and vertical sync (active high
// here), composite blanking, and a 20-bit pixel address into the frame
// buffer. The address counter runs SRAM_DELAY pixels ahead of the display so
// that the memory and output pipeline downstream lines the first visible
// pixel of each line up with the end of blanking. It holds during horizontal
// blanking and is forced to zero from the last visible line until the start
// of the next frame, so the frame buffer is read linearly, 640 bytes a line.
//
// Timing (p = pixel count, L = line count, all registered):
//   h_sync_delay high for p = H_ACTIVE+H_FRONT_PORCH+2 .. H_TOTAL-H_BACK_PORCH+1
//     (the sync is delayed two pixel clocks to match the DAC pipeline)
//   blank high for p = H_ACTIVE .. H_TOTAL-1, and for the lines after the
//     last visible one (the blanking comparisons are offset by two because
//     both h_blank and blank are registers)
//   vga_ram_read_address = line base + SRAM_DELAY + p for visible p
// The counter structure, the constants and the delays follow the original design.
// Reset is asynchronous and active high, as in the original design.
module vga_timing
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
  input  logic               pixel_clock,
  input  logic               reset,
  output logic               h_sync_delay,
  output logic               v_sync_delay,
  output logic               blank,
  output logic [SRAM_AW-1:0] vga_ram_read_address
);

  // Comparison points, as counter values
  localparam logic [10:0] P_LAST      = 11'(H_TOTAL - 1);
  localparam logic [10:0] P_HS_ON     = 11'(H_ACTIVE + H_FRONT_PORCH - 1);
  localparam logic [10:0] P_HS_OFF    = 11'(H_TOTAL - H_BACK_PORCH - 1);
  localparam logic [10:0] P_HB_ON     = 11'(H_ACTIVE - 2);
  localparam logic [10:0] P_HB_OFF    = 11'(H_TOTAL - 2);
  localparam logic [10:0] P_HOLD_ON   = 11'(H_ACTIVE - 1 - SRAM_DELAY);
  localparam logic [10:0] P_HOLD_OFF  = 11'(H_TOTAL - 1 - SRAM_DELAY);
  localparam logic [9:0]  L_LAST      = 10'(V_TOTAL - 1);
  localparam logic [9:0]  L_VS_ON     = 10'(V_ACTIVE + V_FRONT_PORCH - 1);
  localparam logic [9:0]  L_VS_OFF    = 10'(V_TOTAL - V_BACK_PORCH - 1);
  localparam logic [9:0]  L_LAST_VIS  = 10'(V_ACTIVE - 1);

  logic [10:0] pixel_count;   // X coordinate
  logic [9:0]  line_count;    // Y coordinate
  logic        h_sync, v_sync;
  logic        h_sync_d0, v_sync_d0;
  logic        h_blank, v_blank;
  logic        addr_clear;    // hold the address at zero (vertical blanking)
  logic        addr_hold;     // freeze the address (horizontal blanking)
  logic [SRAM_AW-1:0] addr_q;

  logic end_of_line;
  assign end_of_line = (pixel_count == P_LAST);

  always_ff @(posedge pixel_clock or posedge reset) begin
    if (reset) begin
      pixel_count <= '0;
      line_count  <= '0;
    end else begin
      pixel_count <= end_of_line ? '0 : pixel_count + 11'd1;
      if (end_of_line)
        line_count <= (line_count == L_LAST) ? '0 : line_count + 10'd1;
    end
  end

  // Syncs, then two pipeline registers
  always_ff @(posedge pixel_clock or posedge reset) begin
    if (reset) begin
      h_sync       <= 1'b0;
      v_sync       <= 1'b0;
      h_sync_d0    <= 1'b0;
      v_sync_d0    <= 1'b0;
      h_sync_delay <= 1'b0;
      v_sync_delay <= 1'b0;
    end else begin
      if (pixel_count == P_HS_ON)       h_sync <= 1'b1;
      else if (pixel_count == P_HS_OFF) h_sync <= 1'b0;
      if (end_of_line) begin
        if (line_count == L_VS_ON)       v_sync <= 1'b1;
        else if (line_count == L_VS_OFF) v_sync <= 1'b0;
      end
      h_sync_d0    <= h_sync;
      v_sync_d0    <= v_sync;
      h_sync_delay <= h_sync_d0;
      v_sync_delay <= v_sync_d0;
    end
  end

  // Blanking
  always_ff @(posedge pixel_clock or posedge reset) begin
    if (reset) begin
      h_blank <= 1'b0;
      v_blank <= 1'b0;
      blank   <= 1'b0;
    end else begin
      if (pixel_count == P_HB_ON)       h_blank <= 1'b1;
      else if (pixel_count == P_HB_OFF) h_blank <= 1'b0;
      if (pixel_count == P_HB_OFF) begin
        if (line_count == L_LAST_VIS)   v_blank <= 1'b1;
        else if (line_count == L_LAST)  v_blank <= 1'b0;
      end
      blank <= h_blank | v_blank;
    end
  end

  // Frame-buffer address
  always_ff @(posedge pixel_clock or posedge reset) begin
    if (reset) begin
      addr_clear <= 1'b0;
      addr_hold  <= 1'b0;
      addr_q     <= '0;
    end else begin
      if (pixel_count == P_HOLD_OFF) begin
        if (line_count == L_LAST_VIS)  addr_clear <= 1'b1;
        else if (line_count == L_LAST) addr_clear <= 1'b0;
      end
      if (pixel_count == P_HOLD_ON)       addr_hold <= 1'b1;
      else if (pixel_count == P_HOLD_OFF) addr_hold <= 1'b0;
      if (addr_clear)     addr_q <= '0;
      else if (!addr_hold) addr_q <= addr_q + 1'b1;
    end
  end

  assign vga_ram_read_address = addr_q;

endmodule
