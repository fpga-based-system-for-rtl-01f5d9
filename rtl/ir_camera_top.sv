// ir_camera_top: FPGA of the control and image processing module of a
// 640x480 microbolometer thermal camera.
//
// Data path, one VideoBus between each pair of stages:
//   array + 2 ADCs --> fpa_readout --> nuc_correction --> bad_pixel_map
//                  --> image_display (double frame buffer, overlay, VGA)
// fpa_readout drives the array (RESET, INT, MC) and the ADC clock and turns
// the two ADC words into a VideoBus at 6.25 MHz (two pixels per strobe).
// nuc_correction applies N* = G*N + O with per-detector coefficients from
// the coefficient memory; bad_pixel_map replaces the detectors marked in the
// one-bit map by the last good pixel; image_display stores frames in two
// SRAMs used in turn and shows them on a 640x480 60 Hz VGA output with the
// information overlay on top. videobus_tap copies the bus of one chosen stage
// to the monitoring connector. mcu_regs is the register file of the
// supervising microcontroller, which sets integration time and frame period
// and loads the coefficient, bad pixel and overlay memories. adc_sim is a
// simulated data source that can stand in for the array and the ADCs.
//
// Everything runs on one core clock (50 MHz by default); the slower rates
// are clock enables. The image enhancement stage a camera may place between
// bad pixel mapping and display is not part of this design; the bus goes
// straight on. The stage order and the bus follow the camera description;
// the clocking scheme, register map and memory organisation are this
// design's.
module ir_camera_top #(
  parameter int unsigned COLS        = ir_pkg::FPA_COLS,
  parameter int unsigned ROWS        = ir_pkg::FPA_ROWS,
  parameter int unsigned LANES       = ir_pkg::VB_LANES,
  parameter int unsigned DW          = ir_pkg::VB_DW,
  parameter int unsigned CW          = ir_pkg::NUC_CW,
  parameter int unsigned STB_DIV     = ir_pkg::STB_DIV,
  parameter int unsigned LINE_TICKS  = ir_pkg::LINE_TICKS,
  parameter int unsigned READ_START  = ir_pkg::READ_START,
  parameter int unsigned RESET_TICKS = ir_pkg::RESET_TICKS,
  parameter int unsigned H_ACT       = 640,
  parameter int unsigned H_FP        = 16,
  parameter int unsigned H_SYNC      = 96,
  parameter int unsigned H_BP        = 48,
  parameter int unsigned V_ACT       = 480,
  parameter int unsigned V_FP        = 10,
  parameter int unsigned V_SYNC      = 2,
  parameter int unsigned V_BP        = 33
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // focal plane array and ADCs
  output logic                     fpa_reset_o,
  output logic                     fpa_int_o,
  output logic                     fpa_mc_o,
  output logic                     clk_video_o,
  input  logic [LANES-1:0][DW-1:0] dvideo_i,
  // microcontroller bus
  input  logic [7:0]               bus_addr_i,
  input  logic                     bus_wr_i,
  input  logic [31:0]              bus_wdata_i,
  output logic [31:0]              bus_rdata_o,
  // VGA output to the video DACs
  output logic [7:0]               red_o,
  output logic [7:0]               green_o,
  output logic [7:0]               blue_o,
  output logic                     vga_hs_o,
  output logic                     vga_vs_o,
  output logic                     vga_de_o,
  // VideoBus monitoring connector
  output logic                     mon_vs_o,
  output logic                     mon_hs_o,
  output logic                     mon_stb_o,
  output logic [LANES-1:0][DW-1:0] mon_data_o
);

  localparam int unsigned WORDS = COLS * ROWS / LANES;
  localparam int unsigned WAW   = $clog2(WORDS);
  localparam int unsigned PAW   = $clog2(COLS * ROWS);
  localparam int unsigned MAW   = 20;

  // ---------------- microcontroller registers ----------------
  ir_pkg::ctrl_t              ctrl;
  logic [15:0]                int_ticks, frame_rows, frame_cnt, swap_cnt;
  logic [23:0]                ovl_color;
  logic                       coef_we, bpm_we, ovl_we, mem_sel;
  logic [MAW-1:0]             mem_addr;
  logic [LANES-1:0][2*CW-1:0] coef_wdata, coef_rdata;
  logic [LANES-1:0]           bpm_wdata, bpm_rdata;
  logic [1:0]                 ovl_wdata, ovl_rdata;
  logic [31:0]                replaced;

  mcu_regs #(.LANES(LANES), .CW(CW), .AW(MAW)) u_regs (
    .clk(clk), .rst_n(rst_n),
    .bus_addr_i(bus_addr_i), .bus_wr_i(bus_wr_i), .bus_wdata_i(bus_wdata_i), .bus_rdata_o(bus_rdata_o),
    .ctrl_o(ctrl), .int_ticks_o(int_ticks), .frame_rows_o(frame_rows), .ovl_color_o(ovl_color),
    .coef_we_o(coef_we), .bpm_we_o(bpm_we), .ovl_we_o(ovl_we), .mem_addr_o(mem_addr),
    .coef_wdata_o(coef_wdata), .bpm_wdata_o(bpm_wdata), .ovl_wdata_o(ovl_wdata),
    .status_i({swap_cnt[14:0], mem_sel, frame_cnt})
  );

  // ---------------- read-out ----------------
  videobus_if #(.LANES(LANES), .DW(DW)) vb_raw (.clk(clk), .rst_n(rst_n));
  videobus_if #(.LANES(LANES), .DW(DW)) vb_nuc (.clk(clk), .rst_n(rst_n));
  videobus_if #(.LANES(LANES), .DW(DW)) vb_bpm (.clk(clk), .rst_n(rst_n));

  logic [LANES-1:0][DW-1:0] dvideo_sim, dvideo;

  adc_sim #(.COLS(COLS), .ROWS(ROWS), .LANES(LANES), .DW(DW), .READ_START(READ_START)) u_adc_sim (
    .clk(clk), .rst_n(rst_n),
    .fpa_reset_i(fpa_reset_o), .fpa_int_i(fpa_int_o), .fpa_mc_i(fpa_mc_o), .clk_video_i(clk_video_o),
    .dvideo_o(dvideo_sim)
  );

  assign dvideo = ctrl.adc_sim ? dvideo_sim : dvideo_i;

  fpa_readout #(
    .COLS(COLS), .ROWS(ROWS), .LANES(LANES), .DW(DW), .STB_DIV(STB_DIV),
    .LINE_TICKS(LINE_TICKS), .READ_START(READ_START), .RESET_TICKS(RESET_TICKS)
  ) u_readout (
    .clk(clk), .rst_n(rst_n), .enable_i(ctrl.readout_en),
    .int_ticks_i(int_ticks), .frame_rows_i(frame_rows),
    .fpa_reset_o(fpa_reset_o), .fpa_int_o(fpa_int_o), .fpa_mc_o(fpa_mc_o), .clk_video_o(clk_video_o),
    .dvideo_i(dvideo),
    .vs_o(vb_raw.vs), .hs_o(vb_raw.hs), .stb_o(vb_raw.stb), .data_o(vb_raw.data),
    .frame_cnt_o(frame_cnt)
  );

  // ---------------- non-uniformity correction ----------------
  logic [WAW-1:0] coef_raddr, bpm_raddr;

  ram_1w1r #(.WIDTH(LANES * 2 * CW), .DEPTH(WORDS)) u_coef_mem (
    .clk(clk), .we_i(coef_we), .waddr_i(mem_addr[WAW-1:0]), .wdata_i(coef_wdata),
    .raddr_i(coef_raddr), .rdata_o(coef_rdata)
  );

  nuc_correction #(.COLS(COLS), .ROWS(ROWS), .LANES(LANES), .DW(DW), .CW(CW)) u_nuc (
    .clk(clk), .rst_n(rst_n), .enable_i(ctrl.nuc_en),
    .vs_i(vb_raw.vs), .hs_i(vb_raw.hs), .stb_i(vb_raw.stb), .data_i(vb_raw.data),
    .coef_addr_o(coef_raddr), .coef_i(coef_rdata),
    .vs_o(vb_nuc.vs), .hs_o(vb_nuc.hs), .stb_o(vb_nuc.stb), .data_o(vb_nuc.data)
  );

  // ---------------- bad pixel mapping ----------------
  ram_1w1r #(.WIDTH(LANES), .DEPTH(WORDS)) u_bpm_mem (
    .clk(clk), .we_i(bpm_we), .waddr_i(mem_addr[WAW-1:0]), .wdata_i(bpm_wdata),
    .raddr_i(bpm_raddr), .rdata_o(bpm_rdata)
  );

  bad_pixel_map #(.COLS(COLS), .ROWS(ROWS), .LANES(LANES), .DW(DW)) u_bpm (
    .clk(clk), .rst_n(rst_n), .enable_i(ctrl.bpm_en),
    .vs_i(vb_nuc.vs), .hs_i(vb_nuc.hs), .stb_i(vb_nuc.stb), .data_i(vb_nuc.data),
    .map_addr_o(bpm_raddr), .map_i(bpm_rdata),
    .vs_o(vb_bpm.vs), .hs_o(vb_bpm.hs), .stb_o(vb_bpm.stb), .data_o(vb_bpm.data),
    .replaced_o(replaced)
  );

  // ---------------- display ----------------
  logic [PAW-1:0] ovl_raddr;

  ram_1w1r #(.WIDTH(2), .DEPTH(COLS * ROWS)) u_ovl_mem (
    .clk(clk), .we_i(ovl_we), .waddr_i(mem_addr[PAW-1:0]), .wdata_i(ovl_wdata),
    .raddr_i(ovl_raddr), .rdata_o(ovl_rdata)
  );

  image_display #(
    .COLS(COLS), .ROWS(ROWS), .LANES(LANES), .DW(DW),
    .H_ACT(H_ACT), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACT(V_ACT), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_disp (
    .clk(clk), .rst_n(rst_n),
    .vs_i(vb_bpm.vs), .hs_i(vb_bpm.hs), .stb_i(vb_bpm.stb), .data_i(vb_bpm.data),
    .overlay_en_i(ctrl.overlay_en), .ovl_color_i(ovl_color),
    .ovl_addr_o(ovl_raddr), .ovl_i(ovl_rdata),
    .red_o(red_o), .green_o(green_o), .blue_o(blue_o),
    .hs_o(vga_hs_o), .vs_o(vga_vs_o), .de_o(vga_de_o),
    .mem_sel_o(mem_sel), .swap_cnt_o(swap_cnt)
  );

  // ---------------- monitoring connector ----------------
  logic [LANES-1:0][DW-1:0] tap_data [3];
  assign tap_data[0] = vb_raw.data;
  assign tap_data[1] = vb_nuc.data;
  assign tap_data[2] = vb_bpm.data;

  videobus_tap #(.LANES(LANES), .DW(DW), .STAGES(3)) u_tap (
    .clk(clk), .rst_n(rst_n), .sel_i(ctrl.tap_sel),
    .vs_i({vb_bpm.vs, vb_nuc.vs, vb_raw.vs}),
    .hs_i({vb_bpm.hs, vb_nuc.hs, vb_raw.hs}),
    .stb_i({vb_bpm.stb, vb_nuc.stb, vb_raw.stb}),
    .data_i(tap_data),
    .vs_o(mon_vs_o), .hs_o(mon_hs_o), .stb_o(mon_stb_o), .data_o(mon_data_o)
  );

endmodule
