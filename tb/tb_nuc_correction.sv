// tb_nuc_correction: self-checking test of the two-point correction stage.
//
// A 16 x 4 frame of random 14-bit pixels is sent on the VideoBus (strobe
// every 8 clocks, as at 6.25 MHz from 50 MHz) with random per-detector
// gains (0.5 .. 2.0) and offsets (-2000 .. 2000) held in a coefficient
// memory model that answers the address output one clock later. Each output
// pixel is compared with round(G*N + O) computed here in floating point and
// clipped to 0..16383, so both saturation limits are hit. The test also
// checks the output strobe comes 4 clocks after the input strobe, that the
// coefficient address restarts for each frame, and the bypass mode.
module tb_nuc_correction;
  localparam int COLS = 16, ROWS = 4, LANES = 2, DW = 14, CW = 16;
  localparam int WORDS = COLS * ROWS / LANES;
  logic clk = 0, rst_n = 0, en = 1;
  logic vs = 0, hs = 0, stb = 0;
  logic [LANES-1:0][DW-1:0] din = '0, dout;
  logic [LANES-1:0][2*CW-1:0] coef_mem [WORDS];
  logic [LANES-1:0][2*CW-1:0] coef;
  logic [$clog2(WORDS)-1:0] caddr;
  logic vso, hso, stbo;
  int checks = 0, failures = 0, cyc = 0, in_rise[$], frames_out = 0;
  int expq[$];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    coef <= coef_mem[caddr];
  end

  nuc_correction #(.COLS(COLS), .ROWS(ROWS), .LANES(LANES), .DW(DW), .CW(CW)) dut (
    .clk, .rst_n, .enable_i(en), .vs_i(vs), .hs_i(hs), .stb_i(stb), .data_i(din),
    .coef_addr_o(caddr), .coef_i(coef), .vs_o(vso), .hs_o(hso), .stb_o(stbo), .data_o(dout));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int model(int g, int o, int n, bit on);
    real v;
    int q;
    if (!on) return n;
    v = real'(g) / 16384.0 * real'(n) + real'(o);
    q = int'($floor(v + 0.5));
    if (q < 0) q = 0;
    if (q > 16383) q = 16383;
    return q;
  endfunction

  task automatic send_frame(bit on);
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
          expq.push_back(model(int'(coef_mem[idx][l][31:16]), int'($signed(coef_mem[idx][l][15:0])), int'(din[l]), on));
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

  // output checker
  logic stbo_q = 0, vso_q = 0;
  always @(posedge clk) begin
    stbo_q <= stbo;
    vso_q <= vso;
    if (rst_n && !vso && vso_q) frames_out++;
    if (rst_n && stbo && !stbo_q) begin
      int r0, r1, t;
      check(hso && vso, "strobe out of HSYNC");
      t = in_rise.pop_front();
      check(cyc - t == 4, $sformatf("latency %0d", cyc - t));
      r0 = expq.pop_front(); r1 = expq.pop_front();
      check(dout[0] == DW'(r0) && dout[1] == DW'(r1), $sformatf("got %0d %0d exp %0d %0d", dout[0], dout[1], r0, r1));
    end
  end

  initial begin
    for (int i = 0; i < WORDS; i++)
      for (int l = 0; l < LANES; l++) begin
        int g, o;
        g = 8192 + int'($urandom_range(0, 24576));
        o = int'($urandom_range(0, 4000)) - 2000;
        coef_mem[i][l] = {16'(g), 16'(o)};
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_frame(1);
    send_frame(1);
    en = 0;
    send_frame(0);
    check(frames_out == 3, "three frames out");
    check(expq.size() == 0, "all pixels came out");
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
