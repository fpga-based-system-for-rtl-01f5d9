// tb_mcu_regs: self-checking test of the microcontroller register file.
//
// Checks the reset values, writes and reads back the setting registers,
// and loads the three memory windows: a coefficient word is stored only
// when its last lane is written, each window write produces one write
// strobe at the current address, and the address advances by one after
// every window write. The status input is read back unchanged.
module tb_mcu_regs;
  import ir_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [7:0] addr = 0;
  logic [31:0] wdata = 0, rdata, status = 32'hCAFE_0123;
  ctrl_t ctrl;
  logic [15:0] intt, frows;
  logic [23:0] ocol;
  logic cwe, bwe, owe;
  logic [19:0] maddr;
  logic [1:0][31:0] cwd;
  logic [1:0] bwd, owd;
  int checks = 0, failures = 0;
  int n_cwe = 0, n_bwe = 0, n_owe = 0;

  always #5 clk = ~clk;

  mcu_regs #(.LANES(2), .CW(16), .AW(20)) dut (.clk, .rst_n, .bus_addr_i(addr), .bus_wr_i(wr), .bus_wdata_i(wdata),
    .bus_rdata_o(rdata), .ctrl_o(ctrl), .int_ticks_o(intt), .frame_rows_o(frows), .ovl_color_o(ocol),
    .coef_we_o(cwe), .bpm_we_o(bwe), .ovl_we_o(owe), .mem_addr_o(maddr), .coef_wdata_o(cwd),
    .bpm_wdata_o(bwd), .ovl_wdata_o(owd), .status_i(status));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wreg(logic [7:0] a, logic [31:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  task automatic rreg(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; #1 d = rdata;
  endtask

  // memory write strobes
  always @(posedge clk) begin
    if (rst_n && cwe) begin
      n_cwe++;
      check(maddr == 20'(100 + n_cwe - 1) && cwd[0] == 32'h4000_0010 + 32'(n_cwe) && cwd[1] == 32'h3000_FFF0,
            $sformatf("coef write %0d at %0d", n_cwe, maddr));
    end
    if (rst_n && bwe) begin
      n_bwe++;
      check(maddr == 20'(200 + n_bwe - 1) && bwd == 2'(n_bwe), "bpm write");
    end
    if (rst_n && owe) begin
      n_owe++;
      check(maddr == 20'(5000 + n_owe - 1) && owd == 2'(n_owe + 1), "overlay write");
    end
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rreg(REG_CTRL, d);       check(d == 32'h0E, "CTRL reset value");
    rreg(REG_FRAME_ROWS, d); check(d == 620, "FRAME_ROWS reset value");
    rreg(REG_INT_TICKS, d);  check(d == 64, "INT_TICKS reset value");
    wreg(REG_CTRL, 32'h55);
    rreg(REG_CTRL, d);       check(d == 32'h55 && ctrl.readout_en && ctrl.bpm_en && ctrl.adc_sim && ctrl.tap_sel == 2, "CTRL write");
    wreg(REG_INT_TICKS, 32'd123);
    wreg(REG_FRAME_ROWS, 32'd777);
    wreg(REG_OVL_COLOR, 32'h00ABCDEF);
    check(intt == 123 && frows == 777 && ocol == 24'hABCDEF, "setting registers");
    rreg(REG_STATUS, d);     check(d == status, "status read");
    wreg(REG_MEM_ADDR, 32'd100);
    for (int i = 1; i <= 5; i++) begin
      wreg(REG_COEF_L0, 32'h4000_0010 + 32'(i));
      check(!cwe, "no store on lane 0");
      wreg(REG_COEF_L1, 32'h3000_FFF0);
    end
    rreg(REG_MEM_ADDR, d);   check(d == 105, "address advanced");
    wreg(REG_MEM_ADDR, 32'd200);
    for (int i = 1; i <= 3; i++) wreg(REG_BPM_DATA, 32'(i));
    wreg(REG_MEM_ADDR, 32'd5000);
    for (int i = 1; i <= 2; i++) wreg(REG_OVL_DATA, 32'(i + 1));
    repeat (2) @(posedge clk);
    check(n_cwe == 5 && n_bwe == 3 && n_owe == 2, $sformatf("write strobes %0d %0d %0d", n_cwe, n_bwe, n_owe));
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
