// frame_sram: single-port synchronous static RAM holding one video frame.
//
// Two of these form the double buffer of the image display: at any time one
// is written from the VideoBus and the other is read by the VGA side. One
// address port serves both directions: with we_i high the word wdata_i is
// stored at addr_i, otherwise the word at addr_i appears on rdata_o one clock
// later. One word holds one VideoBus word (LANES pixels). The display's use
// of two SRAMs follows the camera description; the single-cycle synchronous
// interface is this design's choice.
module frame_sram #(
  parameter int unsigned WIDTH = ir_pkg::VB_LANES * ir_pkg::VB_DW,
  parameter int unsigned DEPTH = ir_pkg::FPA_COLS * ir_pkg::FPA_ROWS / ir_pkg::VB_LANES,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we_i,
  input  logic [AW-1:0]    addr_i,
  input  logic [WIDTH-1:0] wdata_i,
  output logic [WIDTH-1:0] rdata_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (32'(addr_i) < DEPTH) begin
      if (we_i) mem[addr_i] <= wdata_i;
      else      rdata_o     <= mem[addr_i];
    end
  end

endmodule
