// init_interface: the Initialization Interface of a self-checking neuron.
//
// On an INIT command the neuron takes the parity-coded pixel offered on its
// two duplicated input lines (from the CCD interface for the first neuron of
// a board, from the previous neuron otherwise), keeps it for passing on to the
// next neuron, and loads its state register OUT_Reg with the 3N-coded pixel
// value (3 * pixel). During iterations OUT_Reg is written instead by the
// state update (upd_en, upd_s3).
//
// Checks, merged into the two-rail pair err: at INIT, parity of both copies
// and equality of the two copies; at all times, parity of the held pixel and
// divisibility of OUT_Reg by 3. The INIT checks are registered and so appear
// on err in the cycle after the INIT.
// Parity check, 3N encoding and OUT_Reg follow the document; keeping the
// pixel apart from OUT_Reg so that the chain passes pixels rather than
// evolved states is this design's reading.
module init_interface
  import pe_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  pix_t             sta_a,
  input  pix_t             sta_b,
  output pix_t             pass_a,
  output pix_t             pass_b,
  input  logic             upd_en,
  input  logic [S3_W-1:0]  upd_s3,
  output logic [S3_W-1:0]  s3,
  output logic [1:0]       err
);
  logic [1:0]       in_tr;      // registered INIT checks
  logic [3:0][1:0]  tr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pass_a <= PIX_ZERO;
      pass_b <= PIX_ZERO;
      s3     <= '0;
      in_tr  <= 2'b10;
    end else if (init) begin
      pass_a <= sta_a;
      pass_b <= sta_b;
      s3     <= S3_W'(3 * sta_a[PIX_W-1:0]);
      // duplicated comparison (a against complemented b) and parity of both
      in_tr  <= {sta_a[0], sta_a[0] ^ ((sta_a == sta_b) & (^sta_a) & (^sta_b))};
    end else begin
      if (upd_en) s3 <= upd_s3;
      in_tr <= {s3[0], ~s3[0]};
    end
  end

  residue_checker #(.W(S3_W + 1), .A(3)) u_chk_s3 (.value({1'b0, s3}), .en(1'b1), .tr(tr[0]));

  assign tr[1] = in_tr;
  assign tr[2] = {pass_a[PIX_W], ^pass_a[PIX_W-1:0]};   // odd parity held
  assign tr[3] = {pass_a[0], ~pass_b[0]};               // copies agree (bit 0)

  two_rail_checker #(.N(4)) u_trc (.in_tr(tr), .out_tr(err));
endmodule
