// stat_reg: the machine status register.
//
// Holds AOK, HLT, ADR or INS. While the held status is AOK, the status of the
// instruction executing this cycle (stat_in) is latched at each clock edge;
// once the held status leaves AOK it stays there until reset, and `halted`
// tells the rest of the processor to stop changing state. The lecture gives
// the status values and says the Stat register decides whether the machine
// keeps going; making the stopped state sticky in hardware is this design's
// choice. Reset (synchronous, active high) sets AOK.
module stat_reg
  import seq_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  stat_e stat_in,
  output stat_e stat,
  output logic  halted
);
  always_ff @(posedge clk) begin
    if (rst)                  stat <= STAT_AOK;
    else if (stat == STAT_AOK) stat <= stat_in;
  end

  assign halted = (stat != STAT_AOK);
endmodule
