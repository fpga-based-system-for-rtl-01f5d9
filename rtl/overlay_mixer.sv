// overlay_mixer: superimposes the information overlay on the thermal image.
//
// The thermal pixel is shown as a grey level: its top 8 bits drive red,
// green and blue alike. The overlay plane gives each screen pixel a 2-bit
// code: 0 transparent (image shows), 1 black, 2 white, 3 the programmable
// colour color_i ({R,G,B}, 8 bits each). This draws user interface controls
// and status marks such as a battery gauge over the image. Pixels outside the
// image (in_img_i low) or outside active video (de_i low) are black and
// carry no overlay. With overlay_en_i low the code is ignored. rgb_o is
// registered when en_i is high. Overlaying status data follows the camera
// description; the code format and the grey mapping are this design's
// choices.
module overlay_mixer #(
  parameter int unsigned DW = ir_pkg::VB_DW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en_i,
  input  logic          de_i,
  input  logic          in_img_i,
  input  logic          overlay_en_i,
  input  logic [DW-1:0] pix_i,
  input  logic [1:0]    ovl_i,
  input  logic [23:0]   color_i,
  output logic [23:0]   rgb_o
);

  import ir_pkg::*;

  logic [7:0]  grey;
  logic [23:0] rgb_n;

  assign grey = pix_i[DW-1 -: 8];

  always_comb begin
    rgb_n = in_img_i ? {grey, grey, grey} : 24'h000000;
    if (overlay_en_i && in_img_i) begin
      unique case (ovl_code_e'(ovl_i))
        OVL_BLACK: rgb_n = 24'h000000;
        OVL_WHITE: rgb_n = 24'hFFFFFF;
        OVL_COLOR: rgb_n = color_i;
        default:   ;
      endcase
    end
    if (!de_i) rgb_n = 24'h000000;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    rgb_o <= '0;
    else if (en_i) rgb_o <= rgb_n;
  end

endmodule
