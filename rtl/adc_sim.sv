// adc_sim: generator of simulated A/D converter data for testing the array
// read-out without a detector array.
//
// It watches the same RESET, INT, MC and CLK_VIDEO lines the array and the
// ADCs see and behaves like both together: RESET starts a frame, each rising
// edge of INT starts a row period in which the row integrated in the previous
// period is shifted out, pixel pair k being sampled on the CLK_VIDEO rising
// edge READ_START+k ticks after INT rose (tick 0). Each sample passes an
// ADC_LATENCY-stage pipeline clocked by CLK_VIDEO, as in the 9-cycle pipelined
// ADC, so dvideo_o carries sample t after the rising edge t+ADC_LATENCY.
//
// The detector values form a fixed pattern that a test can recompute:
//   v(r,c) = (64*r + 8*c + 512*(((r>>3) ^ (c>>3)) & 7)) mod 2**DW
// and detectors with (r*COLS + c) mod 97 == 13 are stuck at full scale.
// Outside the read window the output is 0. That a test data generator
// exists follows the camera description; the pattern and its timing are
// this design's own. Lane l carries column 2k+l.
module adc_sim #(
  parameter int unsigned COLS        = ir_pkg::FPA_COLS,
  parameter int unsigned ROWS        = ir_pkg::FPA_ROWS,
  parameter int unsigned LANES       = ir_pkg::VB_LANES,
  parameter int unsigned DW          = ir_pkg::VB_DW,
  parameter int unsigned ADC_LATENCY = ir_pkg::ADC_LAT,
  parameter int unsigned READ_START  = ir_pkg::READ_START
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     fpa_reset_i,
  input  logic                     fpa_int_i,
  input  logic                     fpa_mc_i,
  input  logic                     clk_video_i,
  output logic [LANES-1:0][DW-1:0] dvideo_o
);

  localparam int unsigned WORDS = COLS / LANES;

  logic                          cv_q, int_q, rst_q;
  logic                          edge_v;
  logic [15:0]                   k, k_next;
  logic [15:0]                   int_cnt;   // INT pulses since RESET
  logic [LANES-1:0][DW-1:0]      sample;
  logic [LANES-1:0][DW-1:0]      pipe [ADC_LATENCY];
  logic                          row_start;

  assign edge_v    = clk_video_i && !cv_q;
  assign row_start = fpa_int_i && !int_q;
  assign k_next    = row_start ? 16'd0 : k + 16'd1;

  // detector value seen at this sampling edge
  always_comb begin
    int unsigned r, c, w;
    sample = '0;
    c = 0;
    r = 32'(int_cnt) - 2;            // row being shifted out
    w = 32'(k_next) - READ_START;    // pixel pair index
    if (int_cnt >= 16'd2 && r < ROWS && k_next >= 16'(READ_START) && w < WORDS && fpa_mc_i) begin
      for (int l = 0; l < LANES; l++) begin
        c = w * LANES + l;
        if ((r * COLS + c) % 97 == 13)
          sample[l] = '1;
        else
          sample[l] = DW'(64 * r + 8 * c + 512 * (((r >> 3) ^ (c >> 3)) & 7));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cv_q     <= 1'b0;
      int_q    <= 1'b0;
      rst_q    <= 1'b0;
      k        <= '0;
      int_cnt  <= '0;
      dvideo_o <= '0;
      for (int i = 0; i < ADC_LATENCY; i++) pipe[i] <= '0;
    end else begin
      cv_q <= clk_video_i;
      if (fpa_reset_i && !rst_q) int_cnt <= '0;
      rst_q <= fpa_reset_i;
      if (edge_v) begin
        int_q <= fpa_int_i;
        k     <= k_next;
        if (row_start) int_cnt <= int_cnt + 1'b1;
        pipe[0] <= sample;
        for (int i = 1; i < ADC_LATENCY; i++) pipe[i] <= pipe[i-1];
        dvideo_o <= pipe[ADC_LATENCY-1];
      end
    end
  end

endmodule
