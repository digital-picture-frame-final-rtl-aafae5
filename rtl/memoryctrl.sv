// memoryctrl: SRAM arbiter and access sequencer of the frame-buffer bridge.
//
// The single 16-bit SRAM is shared by the video generator and the processor
// bus. Video always wins: while vreq is high the SRAM cycle is a video read
// (pb_rd, videocycle) and a processor access waits in whatever state issues
// its next SRAM cycle. A processor access (cs while idle) first issues one
// SRAM cycle in MC_COMMON. An access with all four byte enables set
// (onecycle low) needs a second cycle for the other half word: a write goes
// through MC_WR_HI, a read through MC_RD_HI, both with hihalf high so the
// bridge selects the second half word. All SRAM signals are registered in
// the pads, so read data appears two clocks after pb_rd: the first half of a
// read is latched into the OPB read register (ce0, both halves) by a separate
// two-stage pipeline (ra1 -> ra2) that runs alongside the main sequencer,
// and the second half into the low half (ce1) from MC_RD_HI3. MC_XFER
// acknowledges the transfer and clears the read register the clock after.
// Dropping select returns to idle from any state.
//
// Cycle counts without video contention, counted from the idle cycle with
// cs high to the xfer cycle: 16-bit write 2, 32-bit write 3, 16-bit read 4,
// 32-bit read 5; each clock of vreq in MC_COMMON, MC_WR_HI or MC_RD_HI adds
// one. video_ce, the video data latch enable, is vreq delayed two clocks
// (the video read is assumed always to succeed, as in the original design).
//
// The behaviour and latencies follow the original design's one-hot state machine;
// writing it as an enumerated sequencer plus a read pipeline is this
// design's own choice. Reset is asynchronous, active high.
module memoryctrl
  import xsb_pkg::*;
(
  input  logic rst,
  input  logic clk,
  input  logic cs,          // address decoded, access starting
  input  logic select0,     // OPB select, high for the whole access
  input  logic rnw,         // 1 = read
  input  logic vreq,        // video request (priority)
  input  logic onecycle,    // not all byte enables set: one SRAM cycle
  output logic videocycle,  // this SRAM cycle belongs to video
  output logic hihalf,      // second half word of a 32-bit access
  output logic pb_wr,       // SRAM write this cycle
  output logic pb_rd,       // SRAM read this cycle
  output logic xfer,        // OPB transfer acknowledge
  output logic ce0,         // latch read data into both OPB halves
  output logic ce1,         // latch read data into the low OPB half
  output logic rres,        // clear the OPB read register
  output logic video_ce     // latch read data into the video register
);

  mc_state_t state, state_n;
  logic      ra1, ra2;       // first-half read pipeline
  logic      vcycle_1, vcycle_2;

  logic cpu_go;              // the processor gets the SRAM this cycle
  assign cpu_go = ~vreq;

  always_comb begin
    state_n = state;
    if (!select0) begin
      state_n = MC_IDLE;
    end else begin
      unique case (state)
        MC_IDLE:    if (cs) state_n = MC_COMMON;
        MC_COMMON:
          if (cpu_go) begin
            if (!rnw)          state_n = onecycle ? MC_XFER : MC_WR_HI;
            else               state_n = onecycle ? MC_RD_WAIT : MC_RD_HI;
          end
        MC_WR_HI:   if (cpu_go) state_n = MC_XFER;
        MC_RD_HI:   if (cpu_go) state_n = MC_RD_HI2;
        MC_RD_HI2:  state_n = MC_RD_HI3;
        MC_RD_HI3:  state_n = MC_XFER;
        MC_RD_WAIT: if (ra2) state_n = MC_XFER;
        MC_XFER:    state_n = MC_IDLE;
        default:    state_n = MC_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= MC_IDLE;
      ra1      <= 1'b0;
      ra2      <= 1'b0;
      vcycle_1 <= 1'b0;
      vcycle_2 <= 1'b0;
    end else begin
      state    <= state_n;
      ra1      <= select0 & (state == MC_COMMON) & cpu_go & rnw;
      ra2      <= select0 & ra1;
      vcycle_1 <= vreq;
      vcycle_2 <= vcycle_1;
    end
  end

  always_comb begin
    pb_wr  = cpu_go & (((state == MC_COMMON) & ~rnw) | (state == MC_WR_HI));
    pb_rd  = vreq | (cpu_go & (((state == MC_COMMON) & rnw) | (state == MC_RD_HI)));
    hihalf = cpu_go & ((state == MC_WR_HI) | (state == MC_RD_HI));
  end

  assign ce0        = ra2;
  assign ce1        = (state == MC_RD_HI3);
  assign xfer       = (state == MC_XFER);
  assign rres       = xfer;
  assign videocycle = vreq;
  assign video_ce   = vcycle_2;

  // A processor SRAM cycle and a video cycle never share a clock
  assert property (@(posedge clk) disable iff (rst) vreq |-> !pb_wr);
  // The two latch enables never fire together
  assert property (@(posedge clk) disable iff (rst) !(ce0 && ce1));

endmodule
