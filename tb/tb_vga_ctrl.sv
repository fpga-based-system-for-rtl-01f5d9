// tb_vga_ctrl: self-checking test of the VGA timing generator.
//
// Runs two full 640x480 @ 60 Hz frames with a pixel enable every second
// clock and measures, in pixel times, the line period (800), the HS pulse
// (96, starting 16 pixels after the active part), the frame period
// (525 lines), the VS pulse (2 lines, starting 10 lines after the active
// part) and the number of active pixels per frame (640*480).
module tb_vga_ctrl;
  logic clk = 0, rst_n = 0, pen = 0;
  logic [10:0] x, y;
  logic de, hs, vs, fr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) pen <= rst_n ? !pen : 1'b0;

  vga_ctrl dut (.clk, .rst_n, .pix_en_i(pen), .x_o(x), .y_o(y), .de_o(de), .hs_o(hs), .vs_o(vs), .frame_o(fr));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int pix = 0, act = 0, hs_fall = -1, hs_low = 0, vs_fall = -1, vs_low_lines = 0, frames = 0;
  int last_de_end = -1, line_start = -1;
  logic hs_q = 1, vs_q = 1, de_q = 0;
  always @(posedge clk) if (pen) begin
    // values seen for pixel number pix
    if (de) act++;
    if (!hs && hs_q) begin
      if (hs_fall >= 0) check(pix - hs_fall == 800, $sformatf("line period %0d", pix - hs_fall));
      check(pix - last_de_end == 16 || y >= 480, "HS front porch");
      hs_fall = pix; hs_low = 0;
    end
    if (!hs) hs_low++;
    if (hs && !hs_q) check(hs_low == 96, $sformatf("HS width %0d", hs_low));
    if (!de && de_q) last_de_end = pix;
    if (!vs && vs_q) begin
      if (vs_fall >= 0) check(pix - vs_fall == 800 * 525, $sformatf("frame period %0d", pix - vs_fall));
      check(y == 490, $sformatf("VS starts on line %0d", y));
      vs_fall = pix;
    end
    if (vs && !vs_q) check(pix - vs_fall == 2 * 800, "VS width");
    if (fr) begin
      if (frames > 0) check(act == 640 * 480 + 1, $sformatf("active pixels %0d", act - 1));
      act = de ? 1 : 0;
      frames++;
    end
    hs_q <= hs; vs_q <= vs; de_q <= de;
    pix++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (frames == 3);
    check(frames == 3, "frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
