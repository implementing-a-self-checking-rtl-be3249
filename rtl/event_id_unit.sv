// event_id_unit: the neural event identification unit, five neural boards
// of five self-checking neurons (25 neurons, one per pixel of the 5x5
// window).
//
// Neuron j = 5*r + k sits on board r, position k. Board r takes row r of the
// window column from the CCD interface (r = 0 is register A, the oldest row)
// into its first neuron; each INIT moves the pixels one neuron along the
// board, so position k holds the pixel k columns back. The CMD bus is shared
// by all neurons. Each neuron drives its own bit of SIN25 and reads all 25;
// SIN25 and the pixel chains exist twice (duplication with comparison). NZ
// collects the 25 event flags, ERROR the 25 two-rail error pairs. busy is
// high while any neuron is iterating.
// The organisation follows the document; the board/row numbering is this
// design's.
module event_id_unit
  import pe_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  cmd_t                   cmd,
  input  pix_t [WIN-1:0]         col_a,
  input  pix_t [WIN-1:0]         col_b,
  output logic [N_NEUR-1:0]      nz,
  output logic [N_NEUR-1:0][1:0] err,
  output logic                   busy
);
  logic [N_NEUR-1:0] sin_a, sin_b;
  logic [WIN-1:0]    bbusy;

  for (genvar r = 0; r < int'(WIN); r++) begin : g_board
    neural_board u_board (
      .clk, .rst_n, .cmd, .in_a(col_a[r]), .in_b(col_b[r]), .sin_a, .sin_b,
      .sout_a(sin_a[r*WIN +: WIN]), .sout_b(sin_b[r*WIN +: WIN]),
      .nz(nz[r*WIN +: WIN]), .err(err[r*WIN +: WIN]), .busy(bbusy[r])
    );
  end

  assign busy = |bbusy;
endmodule
