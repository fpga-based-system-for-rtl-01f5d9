// tb_videobus_tap: self-checking test of the VideoBus monitor selector.
//
// Drives three different random buses and checks, for each selection, that
// the connector shows the chosen stage's VSYNC, HSYNC, STB and data one
// clock later, and that an out-of-range selection shows stage 0.
module tb_videobus_tap;
  logic clk = 0, rst_n = 0;
  logic [1:0] sel = 0;
  logic [2:0] vs = 0, hs = 0, stb = 0;
  logic [1:0][13:0] data [3];
  logic vso, hso, stbo;
  logic [1:0][13:0] dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  videobus_tap #(.LANES(2), .DW(14), .STAGES(3)) dut (.clk, .rst_n, .sel_i(sel), .vs_i(vs), .hs_i(hs),
    .stb_i(stb), .data_i(data), .vs_o(vso), .hs_o(hso), .stb_o(stbo), .data_o(dout));

  initial begin
    for (int s = 0; s < 3; s++) data[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      int e;
      @(negedge clk);
      sel = 2'(i % 4);
      vs = 3'($urandom); hs = 3'($urandom); stb = 3'($urandom);
      for (int s = 0; s < 3; s++) data[s] = 28'($urandom);
      e = (i % 4 == 3) ? 0 : i % 4;
      @(negedge clk);
      checks++;
      if (vso != vs[e] || hso != hs[e] || stbo != stb[e] || dout != data[e]) begin
        failures++;
        $display("FAIL: sel %0d", sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
