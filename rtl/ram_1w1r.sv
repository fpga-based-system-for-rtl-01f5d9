// ram_1w1r: synchronous memory with one write port and one read port.
//
// Used for the calibration data the microcontroller loads and the pipeline
// reads: the per-detector NUC gain and offset, the one-bit bad pixel map and
// the overlay plane. A write stores wdata_i at waddr_i on the clock edge; a
// read returns the word at raddr_i one clock later. Reading the address being
// written returns the old word. The memory is not cleared by reset; it must
// be loaded before use. The one-cycle read latency is this design's choice.
module ram_1w1r #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 153600,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we_i,
  input  logic [AW-1:0]    waddr_i,
  input  logic [WIDTH-1:0] wdata_i,
  input  logic [AW-1:0]    raddr_i,
  output logic [WIDTH-1:0] rdata_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i && 32'(waddr_i) < DEPTH) mem[waddr_i] <= wdata_i;
    rdata_o <= (32'(raddr_i) < DEPTH) ? mem[raddr_i] : '0;
  end

endmodule
