// nn_controller: the neural network controller, protected by triple modular
// redundancy.
//
// Three identical nn_controller_core copies receive the same inputs; every
// output bit is taken by two-out-of-three majority (tmr_voter), so a single
// upset copy cannot drive the CMD bus, the camera handshake or the results.
// A disagreement among the copies sets the sticky err_tmr flag; err_flag is
// high when any neuron has reported an error or err_tmr is set. The TMR
// protection follows the document; voting outputs only, and the flags, are
// this design's choices. Timing is that of nn_controller_core.
module nn_controller
  import pe_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  params_t                 host_params,
  input  logic                    host_download,
  input  logic                    pix_valid,
  input  logic                    win_valid,
  input  logic [15:0]             win_row,
  input  logic [15:0]             win_col,
  input  logic [N_NEUR-1:0]       nz,
  input  logic [N_NEUR-1:0][1:0]  err_bus,
  input  logic                    busy,
  output logic                    params_loaded,
  output cmd_t                    cmd,
  output logic                    pix_ready,
  output logic                    res_valid,
  output logic                    res_event,
  output logic [N_NEUR-1:0]       res_nz,
  output logic [15:0]             res_row,
  output logic [15:0]             res_col,
  output logic [N_NEUR-1:0]       err_neurons,
  output logic                    err_flag,
  output logic                    err_tmr
);
  typedef struct packed {
    logic              params_loaded;
    cmd_t              cmd;
    logic              pix_ready;
    logic              res_valid;
    logic              res_event;
    logic [N_NEUR-1:0] res_nz;
    logic [15:0]       res_row;
    logic [15:0]       res_col;
    logic [N_NEUR-1:0] err_neurons;
  } ctrl_out_t;

  ctrl_out_t cp [3];
  ctrl_out_t voted;
  logic      mism;

  for (genvar c = 0; c < 3; c++) begin : g_copy
    nn_controller_core u_core (
      .clk, .rst_n, .host_params, .host_download, .pix_valid, .win_valid, .win_row, .win_col,
      .nz, .err_bus, .busy,
      .params_loaded(cp[c].params_loaded), .cmd(cp[c].cmd), .pix_ready(cp[c].pix_ready),
      .res_valid(cp[c].res_valid), .res_event(cp[c].res_event), .res_nz(cp[c].res_nz),
      .res_row(cp[c].res_row), .res_col(cp[c].res_col), .err_neurons(cp[c].err_neurons)
    );
  end

  tmr_voter #(.W($bits(ctrl_out_t))) u_vote (
    .a(cp[0]), .b(cp[1]), .c(cp[2]), .y(voted), .mismatch(mism)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    err_tmr <= 1'b0;
    else if (mism) err_tmr <= 1'b1;
  end

  assign params_loaded = voted.params_loaded;
  assign cmd           = voted.cmd;
  assign pix_ready     = voted.pix_ready;
  assign res_valid     = voted.res_valid;
  assign res_event     = voted.res_event;
  assign res_nz        = voted.res_nz;
  assign res_row       = voted.res_row;
  assign res_col       = voted.res_col;
  assign err_neurons   = voted.err_neurons;
  assign err_flag      = (|voted.err_neurons) | err_tmr;
endmodule
