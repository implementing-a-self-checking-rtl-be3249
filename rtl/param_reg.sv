// param_reg: the Serial_in_Param_Reg of a neuron.
//
// A PRM_BITS-long shift register (96 bits) loaded one bit per LOAD command
// from the shared CMD bus, first bit ending at the most significant end. Its
// contents are read as coded_params_t: six 3N-coded weights, the 9N-coded
// threshold and the 9N-coded temperature. While no download is in progress
// each field is checked for divisibility by 3 or 9; the verdicts are merged
// into the two-rail pair err. Storing the weights 3N-coded in a serial
// register follows the document; field widths and bit order are this
// design's.
module param_reg
  import pe_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  input  logic          sdi,
  output coded_params_t prm,
  output logic [1:0]    err
);
  logic [PRM_BITS-1:0]              sr;
  logic [N_CLASS+1:0][1:0]          tr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '0;
    else if (shift) sr <= {sr[PRM_BITS-2:0], sdi};
  end

  assign prm = coded_params_t'(sr);

  for (genvar k = 0; k < int'(N_CLASS); k++) begin : g_w
    residue_checker #(.W(W3_W), .A(3)) u_chk (.value(prm.w3[k]), .en(~shift), .tr(tr[k]));
  end
  residue_checker #(.W(TH9_W), .A(9)) u_chk_th (.value(prm.th9), .en(~shift), .tr(tr[N_CLASS]));
  residue_checker #(.W(T9_W + 1), .A(9)) u_chk_t (.value({1'b0, prm.t9}), .en(~shift), .tr(tr[N_CLASS+1]));

  two_rail_checker #(.N(N_CLASS + 2)) u_trc (.in_tr(tr), .out_tr(err));
endmodule
