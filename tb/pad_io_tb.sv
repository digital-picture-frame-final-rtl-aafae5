// pad_io_tb: checks the registered SRAM pad interface.
//
// Random inputs are applied each clock; one clock later the pins must show
// them (strobes inverted to active low). The data bus must be driven with
// the registered write data exactly when the previous clock had pb_wr high
// and pb_rd low; otherwise the testbench drives the bus itself, as an SRAM
// would, and the value must appear on pb_dread one clock later. Reset values
// are checked first.
module pad_io_tb;
  import xsb_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic [19:0] PB_A, pb_addr;
  logic        PB_UB_N, PB_LB_N, PB_WE_N, PB_OE_N, RAM_CE_N;
  wire  [15:0] PB_D;
  logic        pb_ub, pb_lb, pb_wr, pb_rd, ram_ce;
  logic [15:0] pb_dread, pb_dwrite, ext_data;
  logic        ext_drive;
  int          checks = 0, failures = 0;
  int          driven_seen = 0, read_seen = 0;

  pad_io dut (.*);

  assign PB_D = ext_drive ? ext_data : 'z;

  always #10 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [19:0] a_q;
  logic [15:0] dw_q, ext_q;
  logic        ub_q, lb_q, wr_q, rd_q, ce_q, drive_q;

  initial begin
    {pb_addr, pb_ub, pb_lb, pb_wr, pb_rd, ram_ce, pb_dwrite} = '0;
    ext_drive = 1'b0; ext_data = '0;
    @(posedge clk); #1;
    check(PB_WE_N && PB_OE_N && RAM_CE_N && PB_UB_N && PB_LB_N && PB_A == 0,
          "reset values");
    check(pb_dread == 16'hFFFF, "reset read register");
    @(negedge clk); rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      pb_addr   = 20'($urandom);
      {pb_ub, pb_lb, pb_wr, pb_rd, ram_ce} = 5'($urandom);
      pb_dwrite = 16'($urandom);
      a_q = pb_addr; dw_q = pb_dwrite;
      {ub_q, lb_q, wr_q, rd_q, ce_q} = {pb_ub, pb_lb, pb_wr, pb_rd, ram_ce};
      drive_q = pb_wr & ~pb_rd;
      @(posedge clk);
      #1;
      // external SRAM model drives the bus only when the pads do not
      ext_drive = ~drive_q;
      ext_data  = 16'($urandom);
      ext_q     = ext_data;
      #1;
      check(PB_A == a_q, "address");
      check(PB_WE_N == ~wr_q && PB_OE_N == ~rd_q && RAM_CE_N == ~ce_q &&
            PB_UB_N == ~ub_q && PB_LB_N == ~lb_q, "strobes");
      if (drive_q) begin
        driven_seen++;
        check(PB_D == dw_q, "write data on bus");
      end
      @(negedge clk);
      // keep the strobe inputs for the next clock random as well
      @(posedge clk);
      #1;
      if (!drive_q) begin
        read_seen++;
        check(pb_dread == ext_q, "read data registered");
      end
      ext_drive = 1'b0;
      @(negedge clk);
    end
    check(driven_seen > 100 && read_seen > 100, "both directions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
