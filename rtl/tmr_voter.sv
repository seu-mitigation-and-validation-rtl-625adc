// Bitwise majority voter of triple modular redundancy.
//
// Each output bit is the value held by at least two of the three inputs, so a
// wrong value in any one copy is masked. The voter is purely combinational
// and is placed after triplicated registers and memories, one voter per TMR
// domain, so that the voter itself is not a single point of failure.
//
// Interface: a, b, c are the three copies of a W-bit signal, y the voted
// value. Timing: no clock, no latency.
module tmr_voter #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);

  always_comb y = (a & b) | (a & c) | (b & c);

endmodule
