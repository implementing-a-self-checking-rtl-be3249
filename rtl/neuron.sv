// neuron: one self-checking neuron of the event identification unit (one
// FPGA in the original system).
//
// It joins the Initialization Interface (pixel chain, OUT_Reg), the
// Serial_in_Param_Reg, the Weighted Sum Section and the Sigmoidal Function
// Section, and adds a serialiser for its own state and a duplicated NZ flag.
// Commands come on the shared CMD bus:
//   LOAD  shift one parameter bit into the parameter register;
//   INIT  take the pixel on sta_*, pass the held one on, reload OUT_Reg;
//   ITER  run one iteration: send OUT_Reg (3N, 10 bits, LSB first) on the
//         neuron's own SIN25 line on both copies (sout_a, sout_b) while
//         receiving all 25 lines, compute the weighted sum, sigma_T and the
//         stability rule, and write the new state into OUT_Reg.
// busy is high from the cycle after ITER until the state is written
// (23 cycles when the activation is divided, 15 when it saturates). nz is
// high while the state is non-zero; it is computed twice and compared.
// err is the neuron's two-rail error pair (valid: 01 or 10; error: 00 or 11)
// merging the checkers of every section.
// The arithmetic stages are registered, but one iteration finishes before the
// next weighted sum starts: the next iteration needs this one's states, so
// output generation is not overlapped with a following weighted sum as a
// fully pipelined neuron would do across windows. Section structure, coding
// and checks follow the document; the cycle schedule is this design's.
module neuron
  import pe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cmd_t              cmd,
  input  pix_t              sta_a,
  input  pix_t              sta_b,
  output pix_t              pass_a,
  output pix_t              pass_b,
  input  logic [N_NEUR-1:0] sin_a,
  input  logic [N_NEUR-1:0] sin_b,
  output logic              sout_a,
  output logic              sout_b,
  output logic              nz,
  output logic              busy,
  output logic [1:0]        err
);
  logic                    iter, done;
  logic [S3_W-1:0]         s3, s3_next, tx;
  coded_params_t           prm;
  logic signed [ACC_W-1:0] act9;
  logic                    act_valid, nz_b;
  logic [4:0][1:0]         tr;

  assign iter = (cmd.op == CMD_ITER);

  init_interface u_init (
    .clk, .rst_n, .init(cmd.op == CMD_INIT), .sta_a, .sta_b, .pass_a, .pass_b,
    .upd_en(done), .upd_s3(s3_next), .s3, .err(tr[0])
  );

  param_reg u_prm (
    .clk, .rst_n, .shift(cmd.op == CMD_LOAD), .sdi(cmd.sdata), .prm, .err(tr[1])
  );

  // State serialiser: bit k is on the line between edges k and k+1 after ITER.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx   <= '0;
      busy <= 1'b0;
    end else begin
      tx <= iter ? s3 : (tx >> 1);
      if (iter)      busy <= 1'b1;
      else if (done) busy <= 1'b0;
    end
  end
  assign sout_a = tx[0];
  assign sout_b = tx[0];

  wss u_wss (
    .clk, .rst_n, .start(iter), .sin_a, .sin_b, .prm, .act9, .act_valid, .err(tr[2])
  );

  sfs u_sfs (
    .clk, .rst_n, .start(act_valid), .act9, .t9(prm.t9), .s3,
    .done, .y3(), .s3_next, .err(tr[3])
  );

  // NZ flag, duplicated with comparison.
  assign nz   = |s3;
  assign nz_b = s3 > '0;
  assign tr[4] = {nz, ~nz_b};

  two_rail_checker #(.N(5)) u_trc (.in_tr(tr), .out_tr(err));

  a_no_cmd_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (cmd.op == CMD_NOP || cmd.op == CMD_LOAD));
endmodule
