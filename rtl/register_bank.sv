// register_bank: one HCLRS-style register bank value.
//
// Models `register xY { name : WIDTH = INIT; }`: the input side (x_name) is
// `d`, the output side (Y_name) is `q`. On every rising clock edge with `en`
// high, q takes d; reset loads the mandatory initial value INIT. Following the
// lecture, every value has a width and an initial value; the enable is this
// design's addition and is what freezes the processor once it has stopped.
// The stall/bubble controls mentioned for later pipelined designs are not
// part of the single-cycle core and are not modelled.
// Timing: q changes only at the clock edge; synchronous, active-high reset.
module register_bank #(
  parameter int unsigned      WIDTH = 64,
  parameter logic [WIDTH-1:0] INIT  = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= INIT;
    else if (en) q <= d;
  end
endmodule
