// videobus_tap: VideoBus monitoring connector output.
//
// Every processing stage produces its own VideoBus; this multiplexer copies
// the bus of the stage chosen by sel_i to the monitoring connector so the
// image can be watched after any stage with a logic analyser. All signals of
// the chosen bus are registered together, so the connector shows the stage
// one clock late with its timing intact. A selection outside 0..STAGES-1
// shows stage 0. A connector for watching every stage follows the camera
// description; the register selection is this design's.
module videobus_tap #(
  parameter int unsigned LANES  = ir_pkg::VB_LANES,
  parameter int unsigned DW     = ir_pkg::VB_DW,
  parameter int unsigned STAGES = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [1:0]               sel_i,
  input  logic [STAGES-1:0]        vs_i,
  input  logic [STAGES-1:0]        hs_i,
  input  logic [STAGES-1:0]        stb_i,
  input  logic [LANES-1:0][DW-1:0] data_i [STAGES],
  output logic                     vs_o,
  output logic                     hs_o,
  output logic                     stb_o,
  output logic [LANES-1:0][DW-1:0] data_o
);

  logic [1:0] s;
  assign s = (32'(sel_i) < STAGES) ? sel_i : 2'd0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vs_o <= 1'b0; hs_o <= 1'b0; stb_o <= 1'b0; data_o <= '0;
    end else begin
      vs_o   <= vs_i[s];
      hs_o   <= hs_i[s];
      stb_o  <= stb_i[s];
      data_o <= data_i[s];
    end
  end

endmodule
