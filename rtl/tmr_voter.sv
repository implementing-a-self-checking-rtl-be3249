// tmr_voter: bitwise two-out-of-three majority voter for triple modular
// redundancy. y takes, bit by bit, the value held by at least two of a, b, c;
// mismatch is high whenever the three copies are not identical. The document
// protects the neural network controller by TMR; the voter itself is the
// textbook circuit. Purely combinational.
module tmr_voter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         mismatch
);
  always_comb begin
    y        = (a & b) | (a & c) | (b & c);
    mismatch = (a != b) || (a != c);
  end
endmodule
