// tb_frame_sram: self-checking test of the single-port frame memory.
//
// Writes a random frame of 2048 words, reads it back in a scrambled order
// and checks each word one clock after its address, and checks that the
// read data does not change during a write cycle.
module tb_frame_sram;
  localparam int W = 28, D = 2048;
  logic clk = 0, we = 0;
  logic [10:0] a = 0;
  logic [W-1:0] wd = 0, rd, hold;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  frame_sram #(.WIDTH(W), .DEPTH(D)) dut (.clk, .we_i(we), .addr_i(a), .wdata_i(wd), .rdata_o(rd));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; a = 11'(i); wd = W'($urandom); ref_mem[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < D; i++) begin
      int k;
      k = (i * 1029) % D;
      @(negedge clk); a = 11'(k);
      @(negedge clk);
      check(rd == ref_mem[k], $sformatf("read %0d", k));
    end
    hold = rd;
    @(negedge clk); we = 1; a = 11'd7; wd = ~ref_mem[7];
    @(negedge clk); we = 0;
    check(rd == hold, "read data held during write");
    @(negedge clk);
    check(rd == ~ref_mem[7], "written word read back");
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
