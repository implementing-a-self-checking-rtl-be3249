// residue_checker: concurrent checker for an AN-coded value (A = 3 or 9).
//
// A fault-free 3N or 9N word is a multiple of A, so the checker reduces the
// word modulo A and flags a non-zero residue. The word is read as two's
// complement. The verdict leaves as a two-rail pair: {v0, ~v0} (where v0 is
// the value's least significant bit, so both code words occur in normal use)
// when the word is valid or the check is disabled, and {v0, v0} when it is not.
// Checking by divisibility follows the document; the two-rail form of the
// result is this design's choice. Purely combinational.
module residue_checker #(
  parameter int unsigned W = 16,
  parameter int unsigned A = 3
) (
  input  logic [W-1:0] value,
  input  logic         en,
  output logic [1:0]   tr
);
  logic ok;
  always_comb begin
    ok = ((32'($signed(value)) % $signed(32'(A))) == 0);
    tr = {value[0], value[0] ^ (ok | ~en)};
  end
endmodule
