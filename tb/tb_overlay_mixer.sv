// tb_overlay_mixer: self-checking test of the overlay mixer.
//
// Applies random 14-bit pixels with every overlay code, with the overlay on
// and off, inside and outside the image and active video, and checks the
// registered colour against the rule: grey = top 8 bits of the pixel,
// code 1 black, 2 white, 3 the programmed colour, 0 the image; black outside
// the image or active video; codes ignored with the overlay off; the output
// holds when the enable is low.
module tb_overlay_mixer;
  logic clk = 0, rst_n = 0, en = 0, de = 0, inimg = 0, oen = 0;
  logic [13:0] pix = 0;
  logic [1:0] code = 0;
  logic [23:0] color = 24'h12A5C3, rgb, held;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  overlay_mixer #(.DW(14)) dut (.clk, .rst_n, .en_i(en), .de_i(de), .in_img_i(inimg), .overlay_en_i(oen),
    .pix_i(pix), .ovl_i(code), .color_i(color), .rgb_o(rgb));

  function automatic logic [23:0] model(bit d, bit ii, bit o, logic [13:0] p, logic [1:0] c);
    logic [23:0] v;
    v = ii ? {3{p[13:6]}} : 24'h0;
    if (ii && o && c == 2'd1) v = 24'h000000;
    if (ii && o && c == 2'd2) v = 24'hFFFFFF;
    if (ii && o && c == 2'd3) v = color;
    if (!d) v = 24'h0;
    return v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en = 1; de = ($urandom_range(0, 7) != 0); inimg = ($urandom_range(0, 5) != 0); oen = i[0];
      pix = 14'($urandom); code = 2'($urandom);
      @(negedge clk);
      checks++;
      if (rgb != model(de, inimg, oen, pix, code)) begin
        failures++;
        $display("FAIL: de%0b img%0b oen%0b pix %h code %0d got %h", de, inimg, oen, pix, code, rgb);
      end
    end
    held = rgb;
    @(negedge clk); en = 0; pix = ~pix; code = 2'd2; oen = 1;
    @(negedge clk);
    checks++;
    if (rgb != held) begin failures++; $display("FAIL: output not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
