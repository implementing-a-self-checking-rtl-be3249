// photon_event_system: top level of the self-checking neural photon event
// identification system.
//
// The CCD interface turns the camera's pixel stream into duplicated,
// parity-coded columns of the 5x5 event window; the event identification
// unit (25 self-checking neurons) evolves each window for three iterations;
// the TMR-protected neural network controller downloads the network
// parameters from the host, paces the window analysis, and returns for each
// complete window its event-flag pattern, an event verdict and the window
// centre, together with any error reported by the neurons' concurrent
// checkers or by the controller's voter.
//
// Interface: camera side frame_start / pix_valid / pix_data / pix_ready (a
// pixel moves when pix_valid and pix_ready are both high); host side
// host_params + host_download pulse, params_loaded, the res_* result (one
// cycle per analysed window, res_valid) and the error flags. Per accepted
// pixel the system needs 2 cycles when the window is incomplete and
// about 2 + 3 x 25 cycles when it is analysed.
module photon_event_system
  import pe_pkg::*;
#(
  parameter int unsigned LINE = 512,
  parameter int unsigned ROWS = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  input  logic              pix_valid,
  input  logic [PIX_W-1:0]  pix_data,
  output logic              pix_ready,
  input  params_t           host_params,
  input  logic              host_download,
  output logic              params_loaded,
  output logic              res_valid,
  output logic              res_event,
  output logic [N_NEUR-1:0] res_nz,
  output logic [15:0]       res_row,
  output logic [15:0]       res_col,
  output logic              err_flag,
  output logic [N_NEUR-1:0] err_neurons,
  output logic              err_tmr
);
  pix_t [WIN-1:0]           col_a, col_b;
  logic                     win_valid, busy;
  logic [15:0]              win_row, win_col;
  cmd_t                     cmd;
  logic [N_NEUR-1:0]        nz;
  logic [N_NEUR-1:0][1:0]   err_bus;

  ccd_interface #(.LINE(LINE), .ROWS(ROWS)) u_ccd (
    .clk, .rst_n, .frame_start, .pix_valid, .pix_data, .pix_ready,
    .col_a, .col_b, .win_valid, .win_row, .win_col
  );

  event_id_unit u_eiu (
    .clk, .rst_n, .cmd, .col_a, .col_b, .nz, .err(err_bus), .busy
  );

  nn_controller u_ctrl (
    .clk, .rst_n, .host_params, .host_download, .pix_valid, .win_valid, .win_row, .win_col,
    .nz, .err_bus, .busy, .params_loaded, .cmd, .pix_ready,
    .res_valid, .res_event, .res_nz, .res_row, .res_col, .err_neurons, .err_flag, .err_tmr
  );
endmodule
