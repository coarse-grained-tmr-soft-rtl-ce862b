// tmr_voter: bitwise 2-of-3 majority voter that also names the faulty copy.
//
// Each bit of y is the majority of the three inputs, so any single faulty copy
// is masked. err[i] is set when input i differs from the voted value in any bit;
// with one faulty copy exactly that copy's bit is set, which is the index of the
// reconfigurable region (PRM) that holds it. The OR of the err outputs of all
// voters forms the PRM error vector that starts a repair. Purely combinational.
module tmr_voter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  output logic [WIDTH-1:0] y,
  output logic [2:0]       err
);

  assign y      = (in0 & in1) | (in1 & in2) | (in0 & in2);
  assign err[0] = (in0 != y);
  assign err[1] = (in1 != y);
  assign err[2] = (in2 != y);

endmodule
