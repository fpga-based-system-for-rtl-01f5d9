// tb_image_display: self-checking test of the frame rate converter and
// display path.
//
// An 8 x 4 image is shown on a reduced 10 x 5 VGA raster (so a black border
// is visible) with a random overlay plane held in a one-clock memory model.
// Frames arrive on the VideoBus slower than the display refreshes. The test
// checks: every displayed pixel (image grey level, overlay colours, black
// border) against the frame that should be on screen; that the memory
// select flips only after a complete frame; that an incomplete frame is
// dropped and the old frame stays on screen; and that the display keeps
// repeating the same frame between input frames (frame rate conversion).
module tb_image_display;
  localparam int COLS = 8, ROWS = 4, LANES = 2, DW = 14;
  localparam int HA = 10, VA = 5;
  logic clk = 0, rst_n = 0;
  logic vs = 0, hs = 0, stb = 0;
  logic [LANES-1:0][DW-1:0] din = '0;
  logic [1:0] ovl_mem [COLS * ROWS];
  logic [1:0] ovl;
  logic [$clog2(COLS * ROWS)-1:0] oaddr;
  logic [7:0] r, g, b;
  logic hso, vso, deo, msel;
  logic [15:0] swaps;
  logic [23:0] color = 24'h20C040;
  int checks = 0, failures = 0;
  int frame_pix [3][COLS * ROWS];   // 0: A, 1: dropped B, 2: C
  int shown = -1;                   // frame expected on screen
  int frames_checked = 0;

  always #5 clk = ~clk;
  always @(posedge clk) ovl <= ovl_mem[oaddr];

  image_display #(.COLS(COLS), .ROWS(ROWS), .LANES(LANES), .DW(DW),
    .H_ACT(HA), .H_FP(2), .H_SYNC(2), .H_BP(2), .V_ACT(VA), .V_FP(1), .V_SYNC(1), .V_BP(1)) dut (
    .clk, .rst_n, .vs_i(vs), .hs_i(hs), .stb_i(stb), .data_i(din),
    .overlay_en_i(1'b1), .ovl_color_i(color), .ovl_addr_o(oaddr), .ovl_i(ovl),
    .red_o(r), .green_o(g), .blue_o(b), .hs_o(hso), .vs_o(vso), .de_o(deo),
    .mem_sel_o(msel), .swap_cnt_o(swaps));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send_frame(int f, int rows);
    vs = 1;
    repeat (8) @(posedge clk);
    for (int rr = 0; rr < rows; rr++) begin
      hs = 1;
      repeat (4) @(posedge clk);
      for (int w = 0; w < COLS / LANES; w++) begin
        for (int l = 0; l < LANES; l++) din[l] = DW'(frame_pix[f][rr * COLS + w * LANES + l]);
        @(posedge clk); stb = 1;
        repeat (4) @(posedge clk); stb = 0;
        repeat (3) @(posedge clk);
      end
      hs = 0;
      repeat (6) @(posedge clk);
    end
    vs = 0;
    repeat (4) @(posedge clk);
  endtask

  function automatic logic [23:0] expect_rgb(int x, int y);
    logic [7:0] gr;
    if (x >= COLS || y >= ROWS || shown < 0) return 24'h0;
    gr = 8'(frame_pix[shown][y * COLS + x] >> 6);
    case (ovl_mem[y * COLS + x])
      2'd1: return 24'h000000;
      2'd2: return 24'hFFFFFF;
      2'd3: return color;
      default: return {gr, gr, gr};
    endcase
  endfunction

  // display checker: samples the outputs once per pixel
  int ox = 0, oy = 0, bad_in_frame = 0, pix_in_frame = 0;
  logic de_q = 0, vs_q = 1;
  bit checking = 0;
  always @(posedge clk) if (dut.pix_en) begin
    if (!vso && vs_q) begin
      if (checking) begin
        check(bad_in_frame == 0 && pix_in_frame == HA * VA,
              $sformatf("displayed frame: %0d bad of %0d pixels (frame %0d)", bad_in_frame, pix_in_frame, shown));
        frames_checked++;
      end
      checking = 1; oy = 0; bad_in_frame = 0; pix_in_frame = 0;
    end
    if (deo) begin
      if (!de_q) ox = 0;
      pix_in_frame++;
      if ({r, g, b} != expect_rgb(ox, oy)) begin
        bad_in_frame++;
        if (bad_in_frame < 4) $display("pixel %0d,%0d got %h exp %h", ox, oy, {r, g, b}, expect_rgb(ox, oy));
      end
      ox++;
    end
    if (!deo && de_q) oy++;
    de_q <= deo; vs_q <= vso;
  end

  initial begin
    for (int f = 0; f < 3; f++)
      for (int i = 0; i < COLS * ROWS; i++) frame_pix[f][i] = int'($urandom_range(0, 16383));
    for (int i = 0; i < COLS * ROWS; i++) ovl_mem[i] = ($urandom_range(0, 3) == 0) ? 2'($urandom) : 2'd0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // frame A
    send_frame(0, ROWS);
    repeat (2) @(posedge clk);
    check(msel == 1 && swaps == 1, "swap after complete frame A");
    // the display picks A up at its next frame
    @(negedge vso); shown = 0; checking = 0;
    repeat (3) @(negedge vso);
    // incomplete frame B
    send_frame(1, ROWS - 2);
    repeat (2) @(posedge clk);
    check(msel == 1 && swaps == 1, "incomplete frame dropped");
    repeat (2) @(negedge vso);
    // frame C
    send_frame(2, ROWS);
    repeat (2) @(posedge clk);
    check(msel == 0 && swaps == 2, "swap after frame C");
    @(negedge vso); shown = 2; checking = 0;
    repeat (3) @(negedge vso);
    check(frames_checked >= 6, $sformatf("frames checked %0d", frames_checked));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
