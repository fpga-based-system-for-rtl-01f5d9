// tb_ram_1w1r: self-checking test of the one-write one-read memory.
//
// Fills a 1000-word memory with random words, reads every word back and
// checks the data one clock after the address, then checks that a read of
// the address being written returns the old word and that the new word
// appears on the next read.
module tb_ram_1w1r;
  localparam int W = 24, D = 1000;
  logic clk = 0, we = 0;
  logic [9:0] wa = 0, ra = 0;
  logic [W-1:0] wd = 0, rd;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ram_1w1r #(.WIDTH(W), .DEPTH(D)) dut (.clk, .we_i(we), .waddr_i(wa), .wdata_i(wd), .raddr_i(ra), .rdata_o(rd));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; wa = 10'(i); wd = W'($urandom); ref_mem[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < D; i++) begin
      int a;
      a = (i * 37) % D;
      @(negedge clk); ra = 10'(a);
      @(negedge clk);
      check(rd == ref_mem[a], $sformatf("read %0d", a));
    end
    // read during write: old data first, new data after
    @(negedge clk); we = 1; wa = 10'd5; wd = ~ref_mem[5]; ra = 10'd5;
    @(negedge clk); we = 0;
    check(rd == ref_mem[5], "read during write returns old word");
    @(negedge clk);
    check(rd == ~ref_mem[5], "new word after write");
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
