// pad_io: registered SRAM bus interface of the frame-buffer bridge.
//
// Every signal between the bridge and the board SRAM passes through one
// register, meant to sit in the I/O pad: the 20-bit address, the active-low
// write enable, output enable, chip enable and upper/lower byte enables, the
// 16-bit write data, the data-bus tristate control and the 16-bit read data.
// The data bus is driven only in the clock after a cycle with pb_wr high
// and pb_rd low; otherwise the pad is released. Read data is sampled from
// the bus into pb_dread, so data requested with pb_rd in clock n (the pads
// strobe the SRAM in clock n+1) is on pb_dread in clock n+2.
//
// Reset (asynchronous, active high) sets the strobes, the read register, the
// write register and the tristate control high (inactive, bus released) and
// the address to zero, as the original design's preset and clear flip-flops do. The
// vendor pad primitives are written here as plain registers and a tristate
// assignment.
module pad_io
  import xsb_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  output logic [SRAM_AW-1:0] PB_A,
  output logic               PB_UB_N,
  output logic               PB_LB_N,
  output logic               PB_WE_N,
  output logic               PB_OE_N,
  output logic               RAM_CE_N,
  inout  wire  [SRAM_DW-1:0] PB_D,
  input  logic [SRAM_AW-1:0] pb_addr,
  input  logic               pb_ub,
  input  logic               pb_lb,
  input  logic               pb_wr,
  input  logic               pb_rd,
  input  logic               ram_ce,
  output logic [SRAM_DW-1:0] pb_dread,
  input  logic [SRAM_DW-1:0] pb_dwrite
);

  logic [SRAM_DW-1:0] dwrite_q;
  logic               release_q;   // 1 = data pads not driven

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      PB_WE_N   <= 1'b1;
      PB_OE_N   <= 1'b1;
      RAM_CE_N  <= 1'b1;
      PB_UB_N   <= 1'b1;
      PB_LB_N   <= 1'b1;
      PB_A      <= '0;
      release_q <= 1'b1;
      dwrite_q  <= '1;
      pb_dread  <= '1;
    end else begin
      PB_WE_N   <= ~pb_wr;
      PB_OE_N   <= ~pb_rd;
      RAM_CE_N  <= ~ram_ce;
      PB_UB_N   <= ~pb_ub;
      PB_LB_N   <= ~pb_lb;
      PB_A      <= pb_addr;
      release_q <= ~pb_wr | pb_rd;
      dwrite_q  <= pb_dwrite;
      pb_dread  <= PB_D;
    end
  end

  assign PB_D = release_q ? 'z : dwrite_q;

endmodule
