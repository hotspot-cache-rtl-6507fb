// hs_monitor_counter: saturating up/down counter for phase-change detection.
//
// While the front end monitors, every executed branch that hits in the BTB is
// reported on en with hot = its hot-block flag. A hot branch counts the value down,
// a non-hot branch counts it up; both directions saturate. The value starts at INIT
// (half scale) and is reloaded by load. sat is high while the value sits at the top
// of its range: non-hot branches have then outnumbered hot ones by 2^(W-1) since
// the load, the sign that the program left the phase whose hot blocks are in L0.
// load has priority over en. One clock edge per update; sat is a plain decode of
// the register. The 8-bit width, the start value of 128 and the counting directions
// follow the document; reloading at the start of each monitoring stage and the
// saturation at zero are this design's choices.
module hs_monitor_counter #(
  parameter int unsigned W    = 8,
  parameter int unsigned INIT = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  input  logic         hot,
  output logic [W-1:0] value,
  output logic         sat
);

  localparam logic [W-1:0] MAX = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      value <= W'(INIT);
    end else if (load) begin
      value <= W'(INIT);
    end else if (en) begin
      if (hot) begin
        if (value != '0) value <= value - 1'b1;
      end else begin
        if (value != MAX) value <= value + 1'b1;
      end
    end
  end

  assign sat = (value == MAX);

endmodule
