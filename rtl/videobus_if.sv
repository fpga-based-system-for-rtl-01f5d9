// videobus_if: the VideoBus that links the image processing stages.
//
// One VideoBus word carries LANES pixels of DW bits (VDATA0, VDATA1). VSYNC
// is high while a frame is being sent, HSYNC while a row is being sent, and
// a rising edge of STB marks a new valid word, which stays on VDATA as long
// as STB is high. Every stage takes a VideoBus in and gives one out, so the
// order of the stages can be changed without touching them. The bus rules
// are checked by assertions: STB only inside HSYNC, HSYNC only inside VSYNC,
// and VDATA stable while STB is high. The signal set follows the camera
// description; the lane count of two is this design's reading of it.
interface videobus_if #(
  parameter int unsigned LANES = ir_pkg::VB_LANES,
  parameter int unsigned DW    = ir_pkg::VB_DW
) (
  input logic clk,
  input logic rst_n
);

  logic                     vs;
  logic                     hs;
  logic                     stb;
  logic [LANES-1:0][DW-1:0] data;

  modport source (output vs, hs, stb, data);
  modport sink   (input  vs, hs, stb, data);

  a_stb_in_row:   assert property (@(posedge clk) disable iff (!rst_n) stb |-> hs);
  a_row_in_frame: assert property (@(posedge clk) disable iff (!rst_n) hs |-> vs);
  a_data_stable:  assert property (@(posedge clk) disable iff (!rst_n) stb && $past(stb) |-> $stable(data));

endinterface
