// vga_ctrl: VGA timing generator.
//
// Two counters, pixel x and line y, advance on every pixel clock enable and
// cover the whole VGA raster, blanking included. From them the module
// decodes the active-video flag and the horizontal and vertical sync pulses
// (active low, as in the 640x480 60 Hz VGA mode). All outputs are functions
// of the counter registers, so they are valid in the cycle pix_en_i is high
// and stay until the next enable. frame_o is high on the first active pixel
// of a frame. The defaults are the standard 640x480 @ 60 Hz timing with a
// 25 MHz pixel rate (core clock 50 MHz, enable every second clock); the
// camera description only asks for VGA output with HS and VS.
module vga_ctrl #(
  parameter int unsigned H_ACT  = 640,
  parameter int unsigned H_FP   = 16,
  parameter int unsigned H_SYNC = 96,
  parameter int unsigned H_BP   = 48,
  parameter int unsigned V_ACT  = 480,
  parameter int unsigned V_FP   = 10,
  parameter int unsigned V_SYNC = 2,
  parameter int unsigned V_BP   = 33
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_en_i,
  output logic [10:0] x_o,
  output logic [10:0] y_o,
  output logic        de_o,
  output logic        hs_o,
  output logic        vs_o,
  output logic        frame_o
);

  localparam int unsigned H_TOT = H_ACT + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_ACT + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_o <= '0;
      y_o <= '0;
    end else if (pix_en_i) begin
      if (x_o == 11'(H_TOT - 1)) begin
        x_o <= '0;
        y_o <= (y_o == 11'(V_TOT - 1)) ? '0 : y_o + 1'b1;
      end else begin
        x_o <= x_o + 1'b1;
      end
    end
  end

  assign de_o    = (x_o < 11'(H_ACT)) && (y_o < 11'(V_ACT));
  assign hs_o    = !((x_o >= 11'(H_ACT + H_FP)) && (x_o < 11'(H_ACT + H_FP + H_SYNC)));
  assign vs_o    = !((y_o >= 11'(V_ACT + V_FP)) && (y_o < 11'(V_ACT + V_FP + V_SYNC)));
  assign frame_o = (x_o == '0) && (y_o == '0);

endmodule
