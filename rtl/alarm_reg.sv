// alarm_reg -- sticky alarm registers.
//
// Each bit of alarm_r becomes 1 in the cycle after its unregistered alarm
// alarm_ur is seen high and stays 1 until clr, so a mismatch during any
// round of an encryption, or during any of the four read-out cycles, is
// still visible when the operation has finished. clr (synchronous, taken at
// the start of an operation) and the reset value 0 are this design's
// choices; clr wins over a simultaneous alarm.
module alarm_reg #(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic [W-1:0] alarm_ur,
  output logic [W-1:0] alarm_r
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   alarm_r <= '0;
    else if (clr) alarm_r <= '0;
    else          alarm_r <= alarm_r | alarm_ur;
  end

endmodule
