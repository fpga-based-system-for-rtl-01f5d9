// tb_adc_sim: self-checking test of the simulated ADC data source.
//
// The testbench drives RESET, INT, MC and CLK_VIDEO itself (one tick = 4
// clocks) for a small 8 x 4 array and checks that pixel pair k of the row
// integrated in the previous INT period leaves the source exactly
// ADC_LATENCY ticks after it was sampled, with the detector pattern and the
// stuck detectors recomputed here, and 0 outside the read window.
module tb_adc_sim;
  localparam int COLS = 8, ROWS = 4, LANES = 2, DW = 14, LAT = 9, RS = 2, LT = 12;
  logic clk = 0, rst_n = 0;
  logic fr = 0, fi = 0, mc = 0, cv = 0;
  logic [LANES-1:0][DW-1:0] dv;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc_sim #(.COLS(COLS), .ROWS(ROWS), .LANES(LANES), .DW(DW), .ADC_LATENCY(LAT), .READ_START(RS)) dut (
    .clk, .rst_n, .fpa_reset_i(fr), .fpa_int_i(fi), .fpa_mc_i(mc), .clk_video_i(cv), .dvideo_o(dv));

  function automatic int expv(int r, int c);
    if ((r * COLS + c) % 97 == 13) return (1 << DW) - 1;
    return (64 * r + 8 * c + 512 * (((r >> 3) ^ (c >> 3)) & 7)) % (1 << DW);
  endfunction

  // expected sample of each tick, indexed by the global tick number
  int exp0[int], exp1[int];
  int t = 0;

  task automatic tick(bit rst_l, bit int_l, int r_out, int k);
    fr = rst_l; fi = int_l; mc = 1; cv = 1;
    if (r_out >= 0 && r_out < ROWS && k >= RS && k < RS + COLS / LANES) begin
      exp0[t] = expv(r_out, (k - RS) * 2);
      exp1[t] = expv(r_out, (k - RS) * 2 + 1);
    end else begin
      exp0[t] = 0; exp1[t] = 0;
    end
    @(posedge clk); @(posedge clk);
    mc = 0; cv = 0;
    @(posedge clk);
    // data of tick t-LAT is on the output since the rising edge
    if (t >= LAT) begin
      checks++;
      if (dv[0] != DW'(exp0[t - LAT]) || dv[1] != DW'(exp1[t - LAT])) begin
        failures++;
        $display("FAIL tick %0d: got %0d %0d exp %0d %0d", t, dv[0], dv[1], exp0[t - LAT], exp1[t - LAT]);
      end
    end
    @(posedge clk);
    t++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int k = 0; k < LT; k++) tick(k < 2, 0, -1, k);              // frame init
      for (int p = 0; p <= ROWS; p++)                                 // integrate rows, shift out
        for (int k = 0; k < LT; k++) tick(0, k < 3, p - 1, k);
      for (int k = 0; k < LT; k++) tick(0, 0, -1, k);                 // blank row
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
