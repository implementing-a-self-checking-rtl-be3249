// two_rail_checker: merges N two-rail pairs into one pair.
//
// Each cell is the classic totally self-checking two-rail checker
//   f = a1&b1 | a0&b0,  g = a1&b0 | a0&b1,
// whose output is a valid pair (01 or 10) exactly when both inputs are valid.
// The cells are chained, so one non-code input (00 or 11) anywhere gives a
// non-code output. The document calls for two-rail logic on the error path;
// the chain form is this design's choice. Purely combinational.
module two_rail_checker #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0][1:0] in_tr,
  output logic [1:0]        out_tr
);
  always_comb begin
    out_tr = in_tr[0];
    for (int i = 1; i < int'(N); i++)
      out_tr = {(out_tr[1] & in_tr[i][1]) | (out_tr[0] & in_tr[i][0]),
                (out_tr[1] & in_tr[i][0]) | (out_tr[0] & in_tr[i][1])};
  end
endmodule
