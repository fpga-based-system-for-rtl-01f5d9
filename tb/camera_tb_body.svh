// camera_tb_body.svh: end-to-end test body shared by the reduced-size and
// the full-size test of ir_camera_top. The including module defines COLS,
// ROWS, LINE_TICKS, STB_DIV, READ_START, FRAME_ROWS, H_* and V_* localparams,
// the signals below and the instance "dut".
//
// Sequence:
//  1. load the NUC coefficients, the bad pixel map and the overlay plane
//     through the microcontroller registers;
//  2. run the read-out from the simulated ADC source with NUC, bad pixel
//     mapping and overlay on, watch the NUC stage on the monitor connector,
//     and compare a whole displayed VGA frame, pixel by pixel, with a model
//     of the chain computed here (pattern -> N*=G*N+O -> last-good
//     replacement -> grey + overlay);
//  3. switch NUC off (bypass), watch the bad pixel stage on the monitor and
//     check a displayed frame again;
//  4. switch to the external ADC inputs and check the raw read-out stage on
//     the monitor carries what the testbench drives.
// Each mechanism is counted and a mechanism that never happened is a
// failure: frame period, buffer swap, NUC correction and its saturation,
// NUC bypass, bad pixel replacement, overlay, each monitor selection and the
// external ADC source.

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // ---------------- reference model ----------------
  function automatic int raw_px(int r, int c);
    if ((r * COLS + c) % 97 == 13) return 16383;
    return (64 * r + 8 * c + 512 * (((r >> 3) ^ (c >> 3)) & 7)) % 16384;
  endfunction
  function automatic int gain_of(int p);  return 16384 + (p * 37) % 12288 - 4096; endfunction
  function automatic int offs_of(int p);  return (p * 53) % 801 - 400; endfunction
  function automatic bit bad_of(int p);   return (p % 97 == 13) || (p % 41 == 5); endfunction
  function automatic logic [1:0] ovl_of(int p);
    int r, c;
    r = p / COLS; c = p % COLS;
    if (r < 2 && c >= COLS - 4) return 2'd3;          // status mark
    if (p % 53 == 0) return 2'd2;
    if (p % 59 == 0) return 2'd1;
    return 2'd0;
  endfunction

  int exp_img [COLS * ROWS];
  int n_sat = 0, n_nuc_changed = 0, n_ovl_px = 0;

  task automatic build_expected(bit nuc_on);
    int last;
    bit have;
    have = 0; last = 0;
    for (int p = 0; p < COLS * ROWS; p++) begin
      int n, q;
      real v;
      n = raw_px(p / COLS, p % COLS);
      q = n;
      if (nuc_on) begin
        v = real'(gain_of(p)) / 16384.0 * real'(n) + real'(offs_of(p));
        q = int'($floor(v + 0.5));
        if (q < 0 || q > 16383) n_sat++;
        if (q < 0) q = 0;
        if (q > 16383) q = 16383;
        if (q != n) n_nuc_changed++;
      end
      if (bad_of(p) && have) q = last;
      else if (!bad_of(p)) begin last = q; have = 1; end
      exp_img[p] = q;
    end
  endtask

  function automatic logic [23:0] expect_rgb(int x, int y);
    logic [7:0] gr;
    int p;
    if (x >= COLS || y >= ROWS) return 24'h0;
    p = y * COLS + x;
    gr = 8'(exp_img[p] >> 6);
    case (ovl_of(p))
      2'd1: return 24'h000000;
      2'd2: return 24'hFFFFFF;
      2'd3: return 24'hFF8000;
      default: return {gr, gr, gr};
    endcase
  endfunction

  // ---------------- microcontroller bus ----------------
  task automatic wreg(logic [7:0] a, logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk); bus_wr = 0;
  endtask

  task automatic load_memories();
    wreg(ir_pkg::REG_MEM_ADDR, 0);
    for (int w = 0; w < COLS * ROWS / 2; w++) begin
      wreg(ir_pkg::REG_COEF_L0, {16'(gain_of(2 * w)), 16'(offs_of(2 * w))});
      wreg(ir_pkg::REG_COEF_L1, {16'(gain_of(2 * w + 1)), 16'(offs_of(2 * w + 1))});
    end
    wreg(ir_pkg::REG_MEM_ADDR, 0);
    for (int w = 0; w < COLS * ROWS / 2; w++) wreg(ir_pkg::REG_BPM_DATA, {30'd0, bad_of(2 * w + 1), bad_of(2 * w)});
    wreg(ir_pkg::REG_MEM_ADDR, 0);
    for (int p = 0; p < COLS * ROWS; p++) wreg(ir_pkg::REG_OVL_DATA, {30'd0, ovl_of(p)});
  endtask

  // ---------------- display checker ----------------
  int ox = 0, oy = 0, bad_in_frame = 0, pix_in_frame = 0, vga_frames_ok = 0;
  logic de_q = 0, vs_q = 1;
  bit checking = 0, armed = 0;
  always @(posedge clk) if (dut.u_disp.pix_en) begin
    if (!vga_vs && vs_q) begin
      if (checking) begin
        check(bad_in_frame == 0 && pix_in_frame == H_ACT * V_ACT,
              $sformatf("displayed frame: %0d wrong of %0d pixels", bad_in_frame, pix_in_frame));
        if (bad_in_frame == 0) vga_frames_ok++;
        checking = 0;
      end
      if (armed) begin checking = 1; armed = 0; end
      oy = 0; bad_in_frame = 0; pix_in_frame = 0;
    end
    if (vga_de) begin
      if (!de_q) ox = 0;
      pix_in_frame++;
      if (checking) begin
        if ({red, green, blue} != expect_rgb(ox, oy)) begin
          bad_in_frame++;
          if (bad_in_frame < 30) $display("pixel %0d,%0d got %h exp %h", ox, oy, {red, green, blue}, expect_rgb(ox, oy));
        end
        if (ox < COLS && oy < ROWS && ovl_of(oy * COLS + ox) != 0) n_ovl_px++;
      end
      ox++;
    end
    if (!vga_de && de_q) oy++;
    de_q <= vga_de; vs_q <= vga_vs;
  end

  task automatic check_one_display_frame();
    int start;
    armed = 1;
    start = vga_frames_ok;
    wait (!armed);
    wait (!checking);
    check(vga_frames_ok == start + 1, "displayed frame matches the model");
  endtask

  // ---------------- monitor connector checker ----------------
  int n_tap [3] = '{0, 0, 0};
  int n_ext = 0;
  logic mstb_q = 0;
  logic [1:0] tap_now = 0;
  bit ext_mode = 0;
  logic [1:0][13:0] stage_q;
  always @(posedge clk) begin
    // the connector shows the chosen stage one clock late
    unique case (tap_now)
      2'd0: stage_q <= dut.vb_raw.data;
      2'd1: stage_q <= dut.vb_nuc.data;
      default: stage_q <= dut.vb_bpm.data;
    endcase
    mstb_q <= mon_stb;
    if (mon_stb && !mstb_q && mon_hs) begin
      check(mon_data == stage_q, "monitor shows the selected stage");
      n_tap[tap_now]++;
      if (ext_mode && tap_now == 0) begin
        check(mon_data[0] == 14'h1234 && mon_data[1] == 14'h0ABC, "external ADC data on the raw bus");
        n_ext++;
      end
    end
  end

  // ---------------- frame period ----------------
  int cyc = 0, last_reset = -1, n_period = 0;
  logic fr_q = 0;
  always @(posedge clk) begin
    cyc++;
    fr_q <= fpa_reset;
    if (fpa_reset && !fr_q) begin
      if (last_reset >= 0) begin
        check(cyc - last_reset == FRAME_ROWS * LINE_TICKS * STB_DIV, $sformatf("frame period %0d", cyc - last_reset));
        n_period++;
      end
      last_reset = cyc;
    end
  end

  task automatic wait_swaps(int n);
    int s;
    s = int'(dut.swap_cnt);
    wait (int'(dut.swap_cnt) >= s + n);
  endtask

  task automatic set_ctrl(bit ro, bit nuc, bit bpm, bit ovl, bit sim, logic [1:0] tap);
    wreg(ir_pkg::REG_CTRL, {25'd0, tap, sim, ovl, bpm, nuc, ro});
    tap_now = tap;
  endtask

  initial begin
    int swaps0, nuc_frames, byp_frames, n_rep;
    repeat (5) @(posedge clk);
    rst_n = 1;
    load_memories();
    wreg(ir_pkg::REG_FRAME_ROWS, FRAME_ROWS);
    wreg(ir_pkg::REG_INT_TICKS, 5);

    // NUC on, monitor on the NUC stage
    build_expected(1);
    set_ctrl(1, 1, 1, 1, 1, 2'd1);
    wait_swaps(1);
    check_one_display_frame();
    nuc_frames = vga_frames_ok;
    n_rep = int'(dut.replaced);

    // NUC bypassed, monitor on the bad pixel stage
    set_ctrl(1, 0, 1, 1, 1, 2'd2);
    build_expected(0);
    wait_swaps(2);
    check_one_display_frame();
    byp_frames = vga_frames_ok - nuc_frames;

    // external ADC, monitor on the raw read-out
    dvideo = {14'h0ABC, 14'h1234};
    ext_mode = 0;
    set_ctrl(1, 0, 1, 1, 0, 2'd0);
    wait (dut.vb_raw.vs == 0);
    wait (dut.vb_raw.vs == 1);
    ext_mode = 1;
    wait (dut.vb_raw.vs == 0);
    ext_mode = 0;
    swaps0 = int'(dut.swap_cnt);

    // every mechanism must have happened
    check(n_period > 0, "frame period measured");
    check(swaps0 >= 3, $sformatf("buffer swaps %0d", swaps0));
    check(nuc_frames > 0, "frame checked with NUC on");
    check(n_nuc_changed > 0, "NUC changed pixels");
    check(n_sat > 0, "NUC saturation");
    check(byp_frames > 0, "frame checked with NUC bypassed");
    check(n_rep > 0, $sformatf("bad pixels replaced %0d", n_rep));
    check(n_ovl_px > 0, "overlay pixels shown");
    for (int s = 0; s < 3; s++) check(n_tap[s] > 0, $sformatf("monitor stage %0d used", s));
    check(n_ext == COLS * ROWS / 2, $sformatf("external ADC words %0d", n_ext));
    $display("mechanisms: periods=%0d swaps=%0d nuc_frames=%0d nuc_changed=%0d sat=%0d bypass_frames=%0d replaced=%0d overlay_px=%0d tap=%0d/%0d/%0d ext=%0d",
             n_period, swaps0, nuc_frames, n_nuc_changed, n_sat, byp_frames, n_rep, n_ovl_px, n_tap[0], n_tap[1], n_tap[2], n_ext);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
