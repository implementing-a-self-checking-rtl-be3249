// neural_board: one neural board, five self-checking neurons that process
// one row of the 5x5 event window.
//
// The first neuron (FPGA-1) takes its pixel from the CCD interface; each
// further neuron takes the pixel held by the one before, so every INIT moves
// the row one pixel along the board. All five neurons share the CMD bus and
// read the whole SIN25 bus; each drives its own line, which the board brings
// out as sout_a/sout_b (bit k for position k). NZ flags and two-rail error
// pairs leave per neuron; busy is high while any neuron iterates.
// Five neurons per board, the pixel chain and the shared buses follow the
// document; the numbering of positions is this design's.
module neural_board
  import pe_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  cmd_t                 cmd,
  input  pix_t                 in_a,
  input  pix_t                 in_b,
  input  logic [N_NEUR-1:0]    sin_a,
  input  logic [N_NEUR-1:0]    sin_b,
  output logic [WIN-1:0]       sout_a,
  output logic [WIN-1:0]       sout_b,
  output logic [WIN-1:0]       nz,
  output logic [WIN-1:0][1:0]  err,
  output logic                 busy
);
  pix_t [WIN:0]   ca, cb;       // pixel chain, [0] = board input
  logic [WIN-1:0] nbusy;

  assign ca[0] = in_a;
  assign cb[0] = in_b;

  for (genvar k = 0; k < int'(WIN); k++) begin : g_neuron
    neuron u_neuron (
      .clk, .rst_n, .cmd, .sta_a(ca[k]), .sta_b(cb[k]), .pass_a(ca[k+1]), .pass_b(cb[k+1]),
      .sin_a, .sin_b, .sout_a(sout_a[k]), .sout_b(sout_b[k]),
      .nz(nz[k]), .busy(nbusy[k]), .err(err[k])
    );
  end

  assign busy = |nbusy;
endmodule
