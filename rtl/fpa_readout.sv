// fpa_readout: read-out controller for a 640x480 microbolometer array with
// two analog outputs and two 14-bit pipelined ADCs.
//
// A tick divider splits the core clock into read-out ticks of STB_DIV core
// clocks; one tick is one MC period of the array, one ADC conversion and one
// VideoBus word (two pixels). Two counters, one counting ticks within a row
// period and one counting row periods within a frame, drive a five-state
// machine:
//   IDLE  - stopped; leaves when enable_i is set
//   INIT  - one row period with RESET high for the first RESET_TICKS ticks
//   ROWS  - ROWS row periods; INT is high for int_ticks_i ticks at the start
//           of each one and integrates row r, while the array shifts out the
//           row integrated in the previous period (the array delays its
//           output by one row)
//   FLUSH - one more INT period that shifts out the last row
//   BLANK - idle row periods until frame_rows_i periods have passed
// Pixel pair k of a row is sampled by the ADCs at the start of tick
// READ_START+k. The ADCs return each sample ADC_LATENCY ticks later, so the
// frame/row/valid flags pass through a shift register of that length before
// they become VSYNC, HSYNC and STB.
//
// VideoBus timing: VDATA changes at core cycle STB_DIV/2+1 of a tick, STB
// rises one cycle later and stays high for STB_DIV/2 cycles; HSYNC is high
// around the strobes of a row, VSYNC around the rows of a frame.
//
// The state machine with two counters, the one-row array delay and the
// 9-cycle ADC latency follow the camera description; the tick lengths, the
// position of the read window and the exact pulse widths are this design's
// choice. Requires even STB_DIV >= 6 and READ_START + COLS/LANES <= LINE_TICKS.
module fpa_readout #(
  parameter int unsigned COLS        = ir_pkg::FPA_COLS,
  parameter int unsigned ROWS        = ir_pkg::FPA_ROWS,
  parameter int unsigned LANES       = ir_pkg::VB_LANES,
  parameter int unsigned DW          = ir_pkg::VB_DW,
  parameter int unsigned ADC_LATENCY = ir_pkg::ADC_LAT,
  parameter int unsigned STB_DIV     = ir_pkg::STB_DIV,
  parameter int unsigned LINE_TICKS  = ir_pkg::LINE_TICKS,
  parameter int unsigned READ_START  = ir_pkg::READ_START,
  parameter int unsigned RESET_TICKS = ir_pkg::RESET_TICKS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          enable_i,
  input  logic [15:0]                   int_ticks_i,
  input  logic [15:0]                   frame_rows_i,
  // array and ADC side
  output logic                          fpa_reset_o,
  output logic                          fpa_int_o,
  output logic                          fpa_mc_o,
  output logic                          clk_video_o,
  input  logic [LANES-1:0][DW-1:0]      dvideo_i,
  // VideoBus
  output logic                          vs_o,
  output logic                          hs_o,
  output logic                          stb_o,
  output logic [LANES-1:0][DW-1:0]      data_o,
  output logic [15:0]                   frame_cnt_o
);

  localparam int unsigned WORDS = COLS / LANES;
  localparam int unsigned CAP   = STB_DIV / 2 + 1;   // capture cycle within a tick
  localparam int unsigned DIVW  = $clog2(STB_DIV);
  localparam int unsigned TW    = $clog2(LINE_TICKS);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_ROWS, S_FLUSH, S_BLANK} state_e;

  typedef struct packed {
    logic vs;
    logic hs;
  } flags_t;

  state_e               state;
  logic [DIVW-1:0]      div_cnt;
  logic [TW-1:0]        tick;     // tick within the row period
  logic [15:0]          rcnt;     // row period within the frame
  logic                 tick_end, row_end;
  flags_t               now_f;
  flags_t [ADC_LATENCY-1:0] sr;
  logic                 stb_pend;

  assign tick_end = (div_cnt == DIVW'(STB_DIV - 1));
  assign row_end  = tick_end && (32'(tick) == LINE_TICKS - 1);

  // flags of the sample taken at the start of the current tick
  always_comb begin
    now_f.vs = (state == S_ROWS && rcnt >= 16'd2) || (state == S_FLUSH);
    now_f.hs = now_f.vs && (32'(tick) >= READ_START) && (32'(tick) < READ_START + WORDS);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_cnt <= '0;
    end else begin
      div_cnt <= tick_end ? '0 : div_cnt + 1'b1;
    end
  end

  // state machine, tick counter and row counter
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      tick        <= '0;
      rcnt        <= '0;
      frame_cnt_o <= '0;
    end else if (tick_end) begin
      tick <= row_end ? '0 : tick + 1'b1;
      unique case (state)
        S_IDLE: begin
          tick <= '0;
          rcnt <= '0;
          if (enable_i) state <= S_INIT;
        end
        S_INIT: if (row_end) begin
          state <= S_ROWS;
          rcnt  <= 16'd1;
        end
        S_ROWS: if (row_end) begin
          rcnt <= rcnt + 1'b1;
          if (rcnt == 16'(ROWS)) state <= S_FLUSH;
        end
        S_FLUSH: if (row_end) begin
          frame_cnt_o <= frame_cnt_o + 1'b1;
          rcnt        <= rcnt + 1'b1;
          if (rcnt + 16'd1 < frame_rows_i) state <= S_BLANK;
          else if (enable_i) begin
            state <= S_INIT;
            rcnt  <= '0;
          end else state <= S_IDLE;
        end
        S_BLANK: if (row_end) begin
          rcnt <= rcnt + 1'b1;
          if (rcnt + 16'd1 >= frame_rows_i) begin
            rcnt  <= '0;
            state <= enable_i ? S_INIT : S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // array control outputs, registered
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fpa_reset_o <= 1'b0;
      fpa_int_o   <= 1'b0;
      fpa_mc_o    <= 1'b0;
      clk_video_o <= 1'b0;
    end else begin
      fpa_reset_o <= (state == S_INIT) && (32'(tick) < RESET_TICKS);
      fpa_int_o   <= (state == S_ROWS || state == S_FLUSH) && (16'(tick) < int_ticks_i);
      fpa_mc_o    <= (state != S_IDLE) && (div_cnt < DIVW'(STB_DIV / 2));
      clk_video_o <= (state != S_IDLE) && (div_cnt < DIVW'(STB_DIV / 2));
    end
  end

  // ADC latency compensation and VideoBus generation
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr       <= '0;
      vs_o     <= 1'b0;
      hs_o     <= 1'b0;
      stb_o    <= 1'b0;
      stb_pend <= 1'b0;
      data_o   <= '0;
    end else begin
      if (tick_end) sr <= {sr[ADC_LATENCY-2:0], now_f};
      if (div_cnt == DIVW'(CAP)) begin
        vs_o     <= sr[ADC_LATENCY-1].vs;
        hs_o     <= sr[ADC_LATENCY-1].hs;
        stb_pend <= sr[ADC_LATENCY-1].hs;
        if (sr[ADC_LATENCY-1].hs) data_o <= dvideo_i;
      end
      if (div_cnt == DIVW'(CAP + 1)) stb_o <= stb_pend;
      if (div_cnt == DIVW'(1))       stb_o <= 1'b0;
    end
  end

endmodule
