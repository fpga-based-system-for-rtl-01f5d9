// nuc_correction: two-point non-uniformity correction on the VideoBus.
//
// Every detector value N is corrected with its own gain G and offset O,
//   N* = G * N + O,
// computed "on the fly": each VideoBus word (LANES pixels) is finished well
// within one strobe period. G is unsigned with GAIN_FRAC fraction bits
// (1.0 = 2**GAIN_FRAC), O is a signed integer in output units; the product
// is rounded to the nearest integer and the result saturated to 0..2**DW-1.
//
// The module also generates the coefficient memory address: a word counter
// that restarts at 0 when VSYNC rises and advances after each strobe inside
// HSYNC, so the coefficients of the next word are already being read while
// the current one is processed. coef_i must hold the word at coef_addr_o no
// later than STB_DIV-1 clocks after the address changes (a one-cycle
// synchronous RAM is used in this design). Coefficient word layout, lane l:
// coef_i[l] = {gain[CW-1:0], offset[CW-1:0]}.
//
// Timing: data_o changes 3 clocks after a rising edge of stb_i, and VSYNC,
// HSYNC and STB leave delayed by 4 clocks, so data is stable before STB
// rises. With enable_i low the pixels pass unchanged with the same latency.
// The formula, the 14-bit data, 16-bit coefficients and the address
// generation follow the camera description; the fixed-point scaling, the
// rounding, the saturation and the bypass are this design's choices.
module nuc_correction #(
  parameter int unsigned COLS      = ir_pkg::FPA_COLS,
  parameter int unsigned ROWS      = ir_pkg::FPA_ROWS,
  parameter int unsigned LANES     = ir_pkg::VB_LANES,
  parameter int unsigned DW        = ir_pkg::VB_DW,
  parameter int unsigned CW        = ir_pkg::NUC_CW,
  parameter int unsigned GAIN_FRAC = ir_pkg::GAIN_FRAC,
  parameter int unsigned AW        = $clog2(COLS * ROWS / LANES)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          enable_i,
  input  logic                          vs_i,
  input  logic                          hs_i,
  input  logic                          stb_i,
  input  logic [LANES-1:0][DW-1:0]      data_i,
  output logic [AW-1:0]                 coef_addr_o,
  input  logic [LANES-1:0][2*CW-1:0]    coef_i,
  output logic                          vs_o,
  output logic                          hs_o,
  output logic                          stb_o,
  output logic [LANES-1:0][DW-1:0]      data_o
);

  localparam int unsigned PW = DW + CW + 3;   // signed product/sum width

  logic                               stb_q, vs_q, take;
  logic [3:0]                         vs_d, hs_d, stb_d;
  logic                               en1, en2;
  logic [LANES-1:0][DW-1:0]           n1, n2;
  logic [LANES-1:0][CW-1:0]           g1;
  logic [LANES-1:0][CW-1:0]           o1;
  logic signed [PW-1:0]               acc [LANES];

  assign take = stb_i && !stb_q && hs_i;

  // coefficient address generator
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      coef_addr_o <= '0;
      stb_q       <= 1'b0;
      vs_q        <= 1'b0;
    end else begin
      stb_q <= stb_i;
      vs_q  <= vs_i;
      if (!vs_i || (vs_i && !vs_q)) coef_addr_o <= '0;
      else if (take)                coef_addr_o <= coef_addr_o + 1'b1;
    end
  end

  // stage 1: capture pixels and coefficients
  // stage 2: multiply and add
  // stage 3: scale, round, saturate
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n1 <= '0; g1 <= '0; o1 <= '0; en1 <= 1'b0;
      n2 <= '0; en2 <= 1'b0;
      for (int l = 0; l < LANES; l++) acc[l] <= '0;
      data_o <= '0;
    end else begin
      if (take) begin
        n1  <= data_i;
        en1 <= enable_i;
        for (int l = 0; l < LANES; l++) begin
          g1[l] <= coef_i[l][2*CW-1:CW];
          o1[l] <= coef_i[l][CW-1:0];
        end
      end
      n2  <= n1;
      en2 <= en1;
      for (int l = 0; l < LANES; l++) begin
        acc[l] <= $signed({3'b000, g1[l]}) * $signed({1'b0, n1[l]})
                + ($signed({{(PW-CW){o1[l][CW-1]}}, o1[l]}) <<< GAIN_FRAC)
                + $signed(PW'(1) <<< (GAIN_FRAC - 1));
      end
      for (int l = 0; l < LANES; l++) begin
        logic signed [PW-1:0] q;
        q = acc[l] >>> GAIN_FRAC;
        if (!en2)                           data_o[l] <= n2[l];
        else if (q < 0)                     data_o[l] <= '0;
        else if (q > $signed(PW'((1 << DW) - 1))) data_o[l] <= '1;
        else                                data_o[l] <= q[DW-1:0];
      end
    end
  end

  // synchronisation signals follow the data
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vs_d <= '0; hs_d <= '0; stb_d <= '0;
    end else begin
      vs_d  <= {vs_d[2:0], vs_i};
      hs_d  <= {hs_d[2:0], hs_i};
      stb_d <= {stb_d[2:0], stb_i};
    end
  end
  assign vs_o  = vs_d[3];
  assign hs_o  = hs_d[3];
  assign stb_o = stb_d[3];

endmodule
