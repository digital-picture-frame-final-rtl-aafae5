// sram_model: behavioural model of the board's asynchronous 16-bit SRAM
// (not synthesizable, testbench use only).
//
// 2^AW words of 16 bits with active-low chip, output, write and byte
// enables. While CE_N and WE_N are low the addressed word is written, upper
// byte from D[15:8] when UB_N is low and lower byte when LB_N is low. While
// CE_N and OE_N are low and WE_N is high the addressed word is driven on D.
// Words start at zero. Output and write enable low together count as an
// error (bus_fights).
module sram_model #(
  parameter int unsigned AW = 20
) (
  input  logic [AW-1:0] A,
  inout  wire  [15:0]   D,
  input  logic          CE_N,
  input  logic          OE_N,
  input  logic          WE_N,
  input  logic          UB_N,
  input  logic          LB_N
);

  logic [15:0] mem [2**AW];
  logic        drive;
  int          bus_fights = 0;

  initial foreach (mem[i]) mem[i] = '0;

  // The pins are sampled every 5 time units, off the clock edges of the
  // testbenches (multiples of 10), so each write cycle is seen while stable;
  // sampling starts once the pins have been through reset.
  initial begin
    #52;
    forever begin
      if (!CE_N && !WE_N) begin
        if (!UB_N) mem[A][15:8] = D[15:8];
        if (!LB_N) mem[A][7:0]  = D[7:0];
        if (!OE_N) begin bus_fights++; $display("SRAM: OE_N and WE_N low together at %0t", $time); end
      end
      #5;
    end
  end

  assign drive = !CE_N && !OE_N && WE_N;

  assign D = drive ? mem[A] : 'z;

endmodule
