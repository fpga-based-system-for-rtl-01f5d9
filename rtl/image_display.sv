// image_display: frame rate converter, overlay and VGA output.
//
// The array is read at its own frame rate, the display runs at the VGA rate,
// so frames pass through two frame memories used in turn (SRAM 1 and
// SRAM 2). The VideoBus side writes the incoming frame, one VideoBus word per
// strobe, into the memory that is not being displayed, while the VGA side
// reads the other one. When a complete frame (ROWS rows, COLS*ROWS/LANES
// words) has been written, the memory select flips at the fall of VSYNC and
// the new frame is shown from then on; an incomplete frame is dropped and
// does not flip the select. The flip is not aligned to the VGA frame, so the
// switch can fall in the middle of a displayed frame.
//
// VGA side: vga_ctrl scans the raster at pixel enable = every second core
// clock. Stage 1 (one pixel time) turns (x, y) into the memory word, lane and
// overlay address; stage 2 gets the pixel and the overlay code from the
// synchronous memories and overlay_mixer forms RED, GREEN, BLUE. HS, VS and
// the active-video flag are delayed to match, so all outputs leave two pixel
// times after the counters. The image sits in the top-left corner of the
// raster; with the default sizes it fills it exactly.
//
// The double buffer with a memory select that swaps after a whole frame, the
// overlay and the VGA controller follow the camera description; the word
// layout, the drop of incomplete frames and the pipeline are this design's.
module image_display #(
  parameter int unsigned COLS   = ir_pkg::FPA_COLS,
  parameter int unsigned ROWS   = ir_pkg::FPA_ROWS,
  parameter int unsigned LANES  = ir_pkg::VB_LANES,
  parameter int unsigned DW     = ir_pkg::VB_DW,
  parameter int unsigned H_ACT  = 640,
  parameter int unsigned H_FP   = 16,
  parameter int unsigned H_SYNC = 96,
  parameter int unsigned H_BP   = 48,
  parameter int unsigned V_ACT  = 480,
  parameter int unsigned V_FP   = 10,
  parameter int unsigned V_SYNC = 2,
  parameter int unsigned V_BP   = 33,
  parameter int unsigned OAW    = $clog2(COLS * ROWS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // VideoBus in
  input  logic                     vs_i,
  input  logic                     hs_i,
  input  logic                     stb_i,
  input  logic [LANES-1:0][DW-1:0] data_i,
  // overlay plane (one-cycle synchronous memory outside)
  input  logic                     overlay_en_i,
  input  logic [23:0]              ovl_color_i,
  output logic [OAW-1:0]           ovl_addr_o,
  input  logic [1:0]               ovl_i,
  // VGA out
  output logic [7:0]               red_o,
  output logic [7:0]               green_o,
  output logic [7:0]               blue_o,
  output logic                     hs_o,
  output logic                     vs_o,
  output logic                     de_o,
  // status
  output logic                     mem_sel_o,    // 0: SRAM 1 displayed, 1: SRAM 2
  output logic [15:0]              swap_cnt_o
);

  localparam int unsigned WORDS = COLS * ROWS / LANES;
  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned FW    = LANES * DW;

  // ---------------- write side ----------------
  logic            vs_q, hs_q, stb_q, take;
  logic [AW:0]     wr_addr;
  logic [15:0]     rows_in;
  logic            wr_we;
  logic [AW-1:0]   wr_a;
  logic [FW-1:0]   wr_data;

  assign take = stb_i && !stb_q && hs_i && vs_i;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vs_q <= 1'b0; hs_q <= 1'b0; stb_q <= 1'b0;
      wr_addr <= '0; rows_in <= '0;
      wr_we <= 1'b0; wr_a <= '0; wr_data <= '0;
      mem_sel_o <= 1'b0; swap_cnt_o <= '0;
    end else begin
      vs_q  <= vs_i;
      hs_q  <= hs_i;
      stb_q <= stb_i;
      wr_we <= 1'b0;
      if (vs_i && !vs_q) begin
        wr_addr <= '0;
        rows_in <= '0;
      end
      if (take && wr_addr < (AW+1)'(WORDS)) begin
        wr_we   <= 1'b1;
        wr_a    <= wr_addr[AW-1:0];
        wr_data <= data_i;
        wr_addr <= wr_addr + 1'b1;
      end
      if (!hs_i && hs_q && vs_i) rows_in <= rows_in + 1'b1;
      if (!vs_i && vs_q && rows_in == 16'(ROWS) && wr_addr == (AW+1)'(WORDS)) begin
        mem_sel_o  <= !mem_sel_o;
        swap_cnt_o <= swap_cnt_o + 1'b1;
      end
    end
  end

  // ---------------- the two frame memories ----------------
  logic [AW-1:0] rd_addr;
  logic [FW-1:0] rdata1, rdata2, rdata;

  frame_sram #(.WIDTH(FW), .DEPTH(WORDS)) u_sram1 (
    .clk     (clk),
    .we_i    (wr_we && mem_sel_o),
    .addr_i  (mem_sel_o ? wr_a : rd_addr),
    .wdata_i (wr_data),
    .rdata_o (rdata1)
  );

  frame_sram #(.WIDTH(FW), .DEPTH(WORDS)) u_sram2 (
    .clk     (clk),
    .we_i    (wr_we && !mem_sel_o),
    .addr_i  (mem_sel_o ? rd_addr : wr_a),
    .wdata_i (wr_data),
    .rdata_o (rdata2)
  );

  assign rdata = mem_sel_o ? rdata2 : rdata1;

  // ---------------- VGA side ----------------
  logic        pix_en;
  logic [10:0] x, y;
  logic        de0, hs0, vs0;
  logic        de1, hs1, vs1, in_img1;
  logic [$clog2(LANES > 1 ? LANES : 2)-1:0] lane1;
  logic [DW-1:0] pix;
  logic [23:0]   rgb;

  always_ff @(posedge clk) begin
    if (!rst_n) pix_en <= 1'b0;
    else        pix_en <= !pix_en;
  end

  vga_ctrl #(
    .H_ACT(H_ACT), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACT(V_ACT), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_vga (
    .clk(clk), .rst_n(rst_n), .pix_en_i(pix_en),
    .x_o(x), .y_o(y), .de_o(de0), .hs_o(hs0), .vs_o(vs0), .frame_o()
  );

  // stage 1: addresses
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      de1 <= 1'b0; hs1 <= 1'b1; vs1 <= 1'b1; in_img1 <= 1'b0;
      rd_addr <= '0; lane1 <= '0; ovl_addr_o <= '0;
    end else if (pix_en) begin
      int unsigned p;
      p        = 32'(y) * COLS + 32'(x);
      de1      <= de0;
      hs1      <= hs0;
      vs1      <= vs0;
      in_img1  <= (32'(x) < COLS) && (32'(y) < ROWS);
      if ((32'(x) < COLS) && (32'(y) < ROWS)) begin
        rd_addr    <= AW'(p / LANES);
        lane1      <= $bits(lane1)'(p % LANES);
        ovl_addr_o <= OAW'(p);
      end
    end
  end

  // stage 2: pixel, overlay and colour
  assign pix = rdata[lane1 * DW +: DW];

  overlay_mixer #(.DW(DW)) u_mix (
    .clk(clk), .rst_n(rst_n), .en_i(pix_en),
    .de_i(de1), .in_img_i(in_img1), .overlay_en_i(overlay_en_i),
    .pix_i(pix), .ovl_i(ovl_i), .color_i(ovl_color_i), .rgb_o(rgb)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hs_o <= 1'b1; vs_o <= 1'b1; de_o <= 1'b0;
    end else if (pix_en) begin
      hs_o <= hs1;
      vs_o <= vs1;
      de_o <= de1;
    end
  end

  assign red_o   = rgb[23:16];
  assign green_o = rgb[15:8];
  assign blue_o  = rgb[7:0];

endmodule
