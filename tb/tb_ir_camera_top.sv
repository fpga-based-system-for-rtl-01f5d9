// tb_ir_camera_top: end-to-end test of the camera FPGA at reduced size.
//
// A 16 x 6 array on a 20 x 8 VGA raster (so the display border is tested
// too), with short row periods; otherwise the same checks as the full-size
// test, see camera_tb_body.svh.
module tb_ir_camera_top;
  localparam int COLS = 16, ROWS = 6, STB_DIV = 8, LINE_TICKS = 16, READ_START = 4;
  localparam int FRAME_ROWS = ROWS + 4;
  localparam int H_ACT = 20, V_ACT = 8;

  logic clk = 0, rst_n = 0;
  logic fpa_reset, fpa_int, fpa_mc, clk_video;
  logic [1:0][13:0] dvideo = '0;
  logic [7:0] bus_addr = 0;
  logic bus_wr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic [7:0] red, green, blue;
  logic vga_hs, vga_vs, vga_de, mon_vs, mon_hs, mon_stb;
  logic [1:0][13:0] mon_data;

  always #10 clk = ~clk;

  ir_camera_top #(.COLS(COLS), .ROWS(ROWS), .STB_DIV(STB_DIV), .LINE_TICKS(LINE_TICKS), .READ_START(READ_START),
    .H_ACT(H_ACT), .H_FP(2), .H_SYNC(3), .H_BP(3), .V_ACT(V_ACT), .V_FP(1), .V_SYNC(1), .V_BP(2)) dut (
    .clk, .rst_n,
    .fpa_reset_o(fpa_reset), .fpa_int_o(fpa_int), .fpa_mc_o(fpa_mc), .clk_video_o(clk_video), .dvideo_i(dvideo),
    .bus_addr_i(bus_addr), .bus_wr_i(bus_wr), .bus_wdata_i(bus_wdata), .bus_rdata_o(bus_rdata),
    .red_o(red), .green_o(green), .blue_o(blue), .vga_hs_o(vga_hs), .vga_vs_o(vga_vs), .vga_de_o(vga_de),
    .mon_vs_o(mon_vs), .mon_hs_o(mon_hs), .mon_stb_o(mon_stb), .mon_data_o(mon_data));

  `include "camera_tb_body.svh"

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
