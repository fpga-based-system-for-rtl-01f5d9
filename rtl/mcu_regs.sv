// mcu_regs: registers of the FPGA as seen by the supervising microcontroller.
//
// The microcontroller reaches the FPGA through its external memory bus,
// here already synchronised to the core clock: an 8-bit word address, a
// one-cycle write strobe with 32-bit data, and read data that follows the
// address combinationally. The map (see ir_pkg::reg_addr_e):
//   CTRL        control bits (ir_pkg::ctrl_t)
//   INT_TICKS   integration time, FRAME_ROWS frame period (frame rate)
//   OVL_COLOR   overlay colour
//   MEM_ADDR    write address for the three memory windows; every window
//               write advances it by one
//   COEF_L0..   {gain, offset} of each lane; writing the last lane stores
//               the whole coefficient word at MEM_ADDR
//   BPM_DATA    bad pixel flags of one VideoBus word at MEM_ADDR
//   OVL_DATA    overlay code of one pixel at MEM_ADDR
//   STATUS      read-only status word
// Registers that set camera parameters and report status follow the camera
// description; the map, widths and the reset values (read-out off, NUC, bad
// pixel and overlay on, 30 Hz frame period) are this design's.
module mcu_regs #(
  parameter int unsigned LANES = ir_pkg::VB_LANES,
  parameter int unsigned CW    = ir_pkg::NUC_CW,
  parameter int unsigned AW    = 20
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [7:0]                 bus_addr_i,
  input  logic                       bus_wr_i,
  input  logic [31:0]                bus_wdata_i,
  output logic [31:0]                bus_rdata_o,
  // settings
  output ir_pkg::ctrl_t              ctrl_o,
  output logic [15:0]                int_ticks_o,
  output logic [15:0]                frame_rows_o,
  output logic [23:0]                ovl_color_o,
  // memory write ports
  output logic                       coef_we_o,
  output logic                       bpm_we_o,
  output logic                       ovl_we_o,
  output logic [AW-1:0]              mem_addr_o,
  output logic [LANES-1:0][2*CW-1:0] coef_wdata_o,
  output logic [LANES-1:0]           bpm_wdata_o,
  output logic [1:0]                 ovl_wdata_o,
  // status
  input  logic [31:0]                status_i
);

  import ir_pkg::*;

  logic [LANES-1:0][2*CW-1:0] stage;

  assign coef_wdata_o = stage;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl_o       <= '{tap_sel: 2'd0, adc_sim: 1'b0, overlay_en: 1'b1,
                        bpm_en: 1'b1, nuc_en: 1'b1, readout_en: 1'b0};
      int_ticks_o  <= 16'(DEF_INT_TICKS);
      frame_rows_o <= 16'(DEF_FRAME_ROWS);
      ovl_color_o  <= 24'hFF8000;
      mem_addr_o   <= '0;
      stage        <= '0;
      coef_we_o    <= 1'b0;
      bpm_we_o     <= 1'b0;
      ovl_we_o     <= 1'b0;
      bpm_wdata_o  <= '0;
      ovl_wdata_o  <= '0;
    end else begin
      // a window write happened in the previous cycle: advance the address
      if (coef_we_o || bpm_we_o || ovl_we_o) mem_addr_o <= mem_addr_o + 1'b1;
      coef_we_o <= 1'b0;
      bpm_we_o  <= 1'b0;
      ovl_we_o  <= 1'b0;
      if (bus_wr_i) begin
        if (bus_addr_i >= REG_COEF_L0 && 32'(bus_addr_i) < 32'(REG_COEF_L0) + LANES) begin
          stage[bus_addr_i - REG_COEF_L0] <= bus_wdata_i[2*CW-1:0];
          if (32'(bus_addr_i) == 32'(REG_COEF_L0) + LANES - 1) coef_we_o <= 1'b1;
        end
        unique case (bus_addr_i)
          REG_CTRL:       ctrl_o       <= ctrl_t'(bus_wdata_i[$bits(ctrl_t)-1:0]);
          REG_INT_TICKS:  int_ticks_o  <= bus_wdata_i[15:0];
          REG_FRAME_ROWS: frame_rows_o <= bus_wdata_i[15:0];
          REG_OVL_COLOR:  ovl_color_o  <= bus_wdata_i[23:0];
          REG_MEM_ADDR:   mem_addr_o   <= bus_wdata_i[AW-1:0];
          REG_BPM_DATA: begin
            bpm_wdata_o <= bus_wdata_i[LANES-1:0];
            bpm_we_o    <= 1'b1;
          end
          REG_OVL_DATA: begin
            ovl_wdata_o <= bus_wdata_i[1:0];
            ovl_we_o    <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    bus_rdata_o = '0;
    unique case (bus_addr_i)
      REG_CTRL:       bus_rdata_o = 32'(ctrl_o);
      REG_INT_TICKS:  bus_rdata_o = 32'(int_ticks_o);
      REG_FRAME_ROWS: bus_rdata_o = 32'(frame_rows_o);
      REG_OVL_COLOR:  bus_rdata_o = 32'(ovl_color_o);
      REG_MEM_ADDR:   bus_rdata_o = 32'(mem_addr_o);
      REG_STATUS:     bus_rdata_o = status_i;
      default:        bus_rdata_o = '0;
    endcase
  end

endmodule
