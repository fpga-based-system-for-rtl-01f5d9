// tb_fpa_readout: self-checking test of the array read-out controller.
//
// A small array (16 x 6) is read through the simulated ADC source, whose
// 9-cycle pipeline behaves like the real converters. The test checks the
// VideoBus frame structure (rows per frame, words per row, strobe period),
// every pixel value against the detector pattern recomputed here, the RESET
// and INT pulse widths, the number of INT pulses per frame, the frame period
// set by the frame-rows register and the delay from the INT that starts a
// read-out row to its first strobe, which includes the ADC latency.
module tb_fpa_readout;
  localparam int COLS = 16, ROWS = 6, LANES = 2, DW = 14, LAT = 9;
  localparam int DIV = 8, LT = 16, RS = 4, RT = 3;
  localparam int FR = ROWS + 4;            // frame rows incl. blanking
  localparam int INTT = 5;

  logic clk = 0, rst_n = 0, en = 0;
  logic fpa_reset, fpa_int, fpa_mc, clk_video, vs, hs, stb;
  logic [LANES-1:0][DW-1:0] dv, data;
  logic [15:0] fcnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fpa_readout #(.COLS(COLS), .ROWS(ROWS), .LANES(LANES), .DW(DW), .ADC_LATENCY(LAT),
                .STB_DIV(DIV), .LINE_TICKS(LT), .READ_START(RS), .RESET_TICKS(RT)) dut (
    .clk, .rst_n, .enable_i(en), .int_ticks_i(16'(INTT)), .frame_rows_i(16'(FR)),
    .fpa_reset_o(fpa_reset), .fpa_int_o(fpa_int), .fpa_mc_o(fpa_mc), .clk_video_o(clk_video),
    .dvideo_i(dv), .vs_o(vs), .hs_o(hs), .stb_o(stb), .data_o(data), .frame_cnt_o(fcnt));

  adc_sim #(.COLS(COLS), .ROWS(ROWS), .LANES(LANES), .DW(DW), .ADC_LATENCY(LAT), .READ_START(RS)) adc (
    .clk, .rst_n, .fpa_reset_i(fpa_reset), .fpa_int_i(fpa_int), .fpa_mc_i(fpa_mc),
    .clk_video_i(clk_video), .dvideo_o(dv));

  function automatic int expv(int r, int c);
    if ((r * COLS + c) % 97 == 13) return (1 << DW) - 1;
    return (64 * r + 8 * c + 512 * (((r >> 3) ^ (c >> 3)) & 7)) % (1 << DW);
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // VideoBus monitor
  int row = 0, word = 0, frames = 0, cyc = 0, last_stb = -1, last_int = -1;
  int int_pulses = 0, int_len = 0, rst_len = 0, rst_rise = -1, prev_rst_rise = -1;
  int row_int_rise[$];
  logic vs_q = 0, hs_q = 0, stb_q = 0, int_q = 0, rst_q = 0;

  always @(posedge clk) begin
    cyc++;
    vs_q <= vs; hs_q <= hs; stb_q <= stb; int_q <= fpa_int; rst_q <= fpa_reset;
    if (rst_n) begin
      if (fpa_reset && !rst_q) begin
        if (rst_rise >= 0 && frames >= 1)
          check(cyc - rst_rise == FR * LT * DIV, $sformatf("frame period %0d", cyc - rst_rise));
        rst_rise = cyc;
        rst_len = 0;
        int_pulses = 0;
        row_int_rise.delete();
      end
      if (fpa_reset) rst_len++;
      if (!fpa_reset && rst_q) check(rst_len == RT * DIV, $sformatf("RESET width %0d", rst_len));
      if (fpa_int && !int_q) begin
        int_pulses++;
        int_len = 0;
        row_int_rise.push_back(cyc);
      end
      if (fpa_int) int_len++;
      if (!fpa_int && int_q) check(int_len == INTT * DIV, $sformatf("INT width %0d", int_len));
      if (vs && !vs_q) begin row = 0; word = 0; end
      if (stb && !stb_q) begin
        check(hs && vs, "strobe outside HSYNC/VSYNC");
        if (word == 0 && row_int_rise.size() > row + 1)
          check(cyc - row_int_rise[row + 1] == (RS + LAT) * DIV + DIV / 2 + 2,
                $sformatf("INT to first strobe %0d", cyc - row_int_rise[row + 1]));
        if (word > 0) check(cyc - last_stb == DIV, "strobe period");
        last_stb = cyc;
        for (int l = 0; l < LANES; l++)
          check(data[l] == DW'(expv(row, word * LANES + l)),
                $sformatf("pixel r%0d c%0d got %0d exp %0d", row, word * LANES + l, data[l], expv(row, word * LANES + l)));
        word++;
      end
      if (!hs && hs_q) begin
        check(word == COLS / LANES, $sformatf("words per row %0d", word));
        row++; word = 0;
      end
      if (!vs && vs_q) begin
        check(row == ROWS, $sformatf("rows per frame %0d", row));
        check(int_pulses == ROWS + 1, $sformatf("INT pulses %0d", int_pulses));
        frames++;
      end
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    en = 1;
    wait (frames == 3);
    en = 0;
    repeat (FR * LT * DIV * 2) @(posedge clk);
    check(fcnt == 16'(frames) || fcnt == 16'(frames + 1), "frame counter");
    check(fpa_int == 0 && !vs, "stopped after enable cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
