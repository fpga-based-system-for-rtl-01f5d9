// tb_bad_pixel_map: self-checking test of bad pixel replacement.
//
// Frames of 16 x 4 random pixels pass with a random bad pixel map (about
// one pixel in four bad, including runs of bad pixels, bad pixels at the
// start of the frame and across lanes and rows) held in a map memory model
// with one clock latency. The expected output is computed here by walking
// the frame in raster order and remembering the last good value. The test
// also checks the replacement counter, the 2-clock latency of the strobe
// and the pass-through mode.
module tb_bad_pixel_map;
  localparam int COLS = 16, ROWS = 4, LANES = 2, DW = 14;
  localparam int WORDS = COLS * ROWS / LANES;
  logic clk = 0, rst_n = 0, en = 1;
  logic vs = 0, hs = 0, stb = 0;
  logic [LANES-1:0][DW-1:0] din = '0, dout;
  logic [LANES-1:0] map_mem [WORDS];
  logic [LANES-1:0] map;
  logic [$clog2(WORDS)-1:0] maddr;
  logic vso, hso, stbo;
  logic [31:0] replaced;
  int checks = 0, failures = 0, cyc = 0, in_rise[$], exp_rep = 0;
  int expq[$];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    map <= map_mem[maddr];
  end

  bad_pixel_map #(.COLS(COLS), .ROWS(ROWS), .LANES(LANES), .DW(DW)) dut (
    .clk, .rst_n, .enable_i(en), .vs_i(vs), .hs_i(hs), .stb_i(stb), .data_i(din),
    .map_addr_o(maddr), .map_i(map), .vs_o(vso), .hs_o(hso), .stb_o(stbo), .data_o(dout),
    .replaced_o(replaced));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send_frame(bit on);
    int last;
    bit have;
    have = 0; last = 0;
    vs = 1;
    repeat (8) @(posedge clk);
    for (int r = 0; r < ROWS; r++) begin
      hs = 1;
      repeat (4) @(posedge clk);
      for (int w = 0; w < COLS / LANES; w++) begin
        int idx;
        idx = r * COLS / LANES + w;
        for (int l = 0; l < LANES; l++) begin
          din[l] = DW'($urandom);
          if (on && map_mem[idx][l] && have) begin
            expq.push_back(last);
            exp_rep++;
          end else begin
            expq.push_back(int'(din[l]));
            if (!on || !map_mem[idx][l]) begin last = int'(din[l]); have = 1; end
          end
        end
        @(posedge clk); stb = 1; in_rise.push_back(cyc + 1);
        repeat (4) @(posedge clk); stb = 0;
        repeat (3) @(posedge clk);
      end
      repeat (4) @(posedge clk);
      hs = 0;
      repeat (6) @(posedge clk);
    end
    vs = 0;
    repeat (20) @(posedge clk);
  endtask

  logic stbo_q = 0;
  always @(posedge clk) begin
    stbo_q <= stbo;
    if (rst_n && stbo && !stbo_q) begin
      int r0, r1, t;
      t = in_rise.pop_front();
      check(cyc - t == 2, $sformatf("latency %0d", cyc - t));
      r0 = expq.pop_front(); r1 = expq.pop_front();
      check(dout[0] == DW'(r0) && dout[1] == DW'(r1), $sformatf("got %0d %0d exp %0d %0d", dout[0], dout[1], r0, r1));
    end
  end

  initial begin
    for (int i = 0; i < WORDS; i++) map_mem[i] = LANES'($urandom_range(0, 3) == 0 ? $urandom : 0);
    map_mem[0] = 2'b11;                 // frame starts with bad pixels
    map_mem[3] = 2'b11; map_mem[4] = 2'b11; map_mem[5] = 2'b01;   // run of bad pixels
    map_mem[7] = 2'b10; map_mem[8] = 2'b01;                     // across a row end
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_frame(1);
    send_frame(1);
    en = 0;
    send_frame(0);
    check(expq.size() == 0, "all pixels came out");
    check(replaced == 32'(exp_rep), $sformatf("replaced %0d exp %0d", replaced, exp_rep));
    check(exp_rep > 10, "enough bad pixels exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
