// bad_pixel_map: replacement of defective detectors on the VideoBus.
//
// A one-bit-per-pixel map marks each detector bad (1) or good (0). The
// module reads the map word of each VideoBus word (LANES flags, lane 0 in
// bit 0) through map_addr_o, which restarts at 0 when VSYNC rises and
// advances after each strobe inside HSYNC, just like the NUC coefficient
// address. Pixels are handled in raster order (lane 0 before lane 1, the end
// of a row continues into the next): a bad pixel is replaced by the value of
// the last good pixel before it; a good pixel passes and becomes the new last
// good value. A bad pixel before the first good one of a frame keeps its own
// value. With enable_i low all pixels pass unchanged.
//
// Timing: data_o changes 1 clock after a rising edge of stb_i; VSYNC, HSYNC
// and STB leave delayed by 2 clocks. map_i must hold the flags of the word at
// map_addr_o within STB_DIV-1 clocks. The map format and the "previous good
// pixel" rule follow the camera description; raster-order handling across
// lanes and rows, the first-pixel case and the enable are this design's.
module bad_pixel_map #(
  parameter int unsigned COLS  = ir_pkg::FPA_COLS,
  parameter int unsigned ROWS  = ir_pkg::FPA_ROWS,
  parameter int unsigned LANES = ir_pkg::VB_LANES,
  parameter int unsigned DW    = ir_pkg::VB_DW,
  parameter int unsigned AW    = $clog2(COLS * ROWS / LANES)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable_i,
  input  logic                     vs_i,
  input  logic                     hs_i,
  input  logic                     stb_i,
  input  logic [LANES-1:0][DW-1:0] data_i,
  output logic [AW-1:0]            map_addr_o,
  input  logic [LANES-1:0]         map_i,
  output logic                     vs_o,
  output logic                     hs_o,
  output logic                     stb_o,
  output logic [LANES-1:0][DW-1:0] data_o,
  output logic [31:0]              replaced_o     // bad pixels replaced since reset
);

  logic                     stb_q, vs_q, take, frame_start;
  logic [1:0]               vs_d, hs_d, stb_d;
  logic [DW-1:0]            last_good, last_good_n;
  logic                     have_good, have_good_n;
  logic [LANES-1:0][DW-1:0] fixed;
  logic [31:0]              n_rep;

  assign take        = stb_i && !stb_q && hs_i;
  assign frame_start = vs_i && !vs_q;

  // replacement of the lanes in raster order
  always_comb begin
    last_good_n = last_good;
    have_good_n = have_good;
    n_rep       = '0;
    for (int l = 0; l < LANES; l++) begin
      if (enable_i && map_i[l] && have_good_n) begin
        fixed[l] = last_good_n;
        n_rep    = n_rep + 1;
      end else begin
        fixed[l] = data_i[l];
        if (!map_i[l] || !enable_i) begin
          last_good_n = data_i[l];
          have_good_n = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stb_q      <= 1'b0;
      vs_q       <= 1'b0;
      map_addr_o <= '0;
      last_good  <= '0;
      have_good  <= 1'b0;
      data_o     <= '0;
      replaced_o <= '0;
    end else begin
      stb_q <= stb_i;
      vs_q  <= vs_i;
      if (!vs_i || frame_start) begin
        map_addr_o <= '0;
        have_good  <= 1'b0;
      end else if (take) begin
        map_addr_o <= map_addr_o + 1'b1;
        last_good  <= last_good_n;
        have_good  <= have_good_n;
        data_o     <= fixed;
        replaced_o <= replaced_o + n_rep;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vs_d <= '0; hs_d <= '0; stb_d <= '0;
    end else begin
      vs_d  <= {vs_d[0], vs_i};
      hs_d  <= {hs_d[0], hs_i};
      stb_d <= {stb_d[0], stb_i};
    end
  end
  assign vs_o  = vs_d[1];
  assign hs_o  = hs_d[1];
  assign stb_o = stb_d[1];

endmodule
