// tb_ir_camera_25hz: end-to-end test of the camera FPGA at its default size,
// with the array read at 25 Hz instead of the default 30 Hz.
//
// 640 x 480 array, two pixels per 6.25 MHz strobe from a 50 MHz core clock,
// 640 x 480 60 Hz VGA output and a 25 Hz frame period (744 row periods of
// 336 ticks). Loads all calibration memories, then runs the checks of
// camera_tb_body.svh: full displayed frames compared pixel by pixel with the
// model, NUC on and bypassed, bad pixel replacement, overlay, monitor
// selections and the external ADC source.
module tb_ir_camera_25hz;
  localparam int COLS = 640, ROWS = 480, STB_DIV = 8, LINE_TICKS = 336, READ_START = 8;
  localparam int FRAME_ROWS = 744;   // 744 * 336 * 160 ns = 40.0 ms -> 25 Hz
  localparam int H_ACT = 640, V_ACT = 480;

  logic clk = 0, rst_n = 0;
  logic fpa_reset, fpa_int, fpa_mc, clk_video;
  logic [1:0][13:0] dvideo = '0;
  logic [7:0] bus_addr = 0;
  logic bus_wr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic [7:0] red, green, blue;
  logic vga_hs, vga_vs, vga_de, mon_vs, mon_hs, mon_stb;
  logic [1:0][13:0] mon_data;

  always #10 clk = ~clk;   // 50 MHz

  ir_camera_top dut (
    .clk, .rst_n,
    .fpa_reset_o(fpa_reset), .fpa_int_o(fpa_int), .fpa_mc_o(fpa_mc), .clk_video_o(clk_video), .dvideo_i(dvideo),
    .bus_addr_i(bus_addr), .bus_wr_i(bus_wr), .bus_wdata_i(bus_wdata), .bus_rdata_o(bus_rdata),
    .red_o(red), .green_o(green), .blue_o(blue), .vga_hs_o(vga_hs), .vga_vs_o(vga_vs), .vga_de_o(vga_de),
    .mon_vs_o(mon_vs), .mon_hs_o(mon_hs), .mon_stb_o(mon_stb), .mon_data_o(mon_data));

  `include "camera_tb_body.svh"

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
