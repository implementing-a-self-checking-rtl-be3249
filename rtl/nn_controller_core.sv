// nn_controller_core: one copy of the neural network controller; three of
// them run in lock step inside nn_controller (triple modular redundancy).
//
// Sequence: a host_download pulse encodes the host parameters (3N weights,
// 9N threshold and temperature) and shifts them, most significant bit first,
// over the CMD bus with PRM_BITS LOAD commands. From then on the core accepts
// one camera pixel at a time (pix_ready); in the cycle after a pixel is taken
// it sends INIT, which shifts the window through the neurons. If the window
// is complete (win_valid) it then sends ITERATIONS ITER commands, each after
// the neurons have become idle, reads the NZ pattern and emits one result:
// the pattern, the window centre, and res_event, set when the centre
// neuron's flag is active. Every cycle it samples the 25 two-rail ERROR pairs
// and keeps a sticky mask of neurons that reported a non-code pair.
// Outputs are a Moore function of the state, packed in ctrl_out_t for voting.
// Downloading, paced window analysis, NZ collection and error reporting
// follow the document; the event rule, handshakes and command encoding are
// this design's.
module nn_controller_core
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
  output logic [N_NEUR-1:0]       err_neurons
);
  typedef enum logic [2:0] {C_IDLE, C_DL, C_READY, C_INIT, C_ITER, C_WAIT, C_RESULT} cstate_e;
  cstate_e                       st;
  logic [PRM_BITS-1:0]           sr;
  logic [$clog2(PRM_BITS+1)-1:0] cnt;
  logic [1:0]                    it;
  logic [15:0]                   row_q, col_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= C_IDLE;
      sr            <= '0;
      cnt           <= '0;
      it            <= '0;
      row_q         <= '0;
      col_q         <= '0;
      params_loaded <= 1'b0;
      err_neurons   <= '0;
    end else begin
      for (int j = 0; j < int'(N_NEUR); j++)
        if (tr_bad(err_bus[j])) err_neurons[j] <= 1'b1;
      if (host_download && (st == C_IDLE || st == C_READY)) begin
        sr            <= encode_params(host_params);
        cnt           <= ($clog2(PRM_BITS+1))'(PRM_BITS);
        params_loaded <= 1'b0;
        st            <= C_DL;
      end else begin
        unique case (st)
          C_IDLE: ;
          C_DL: begin
            sr  <= sr << 1;
            cnt <= cnt - 1'b1;
            if (cnt == 1) begin
              params_loaded <= 1'b1;
              st            <= C_READY;
            end
          end
          C_READY:  if (pix_valid) st <= C_INIT;
          C_INIT: begin
            row_q <= win_row;
            col_q <= win_col;
            it    <= '0;
            st    <= win_valid ? C_ITER : C_READY;
          end
          C_ITER:   st <= C_WAIT;
          C_WAIT:   if (!busy) begin
            it <= it + 1'b1;
            st <= (it == 2'(ITERATIONS - 1)) ? C_RESULT : C_ITER;
          end
          C_RESULT: st <= C_READY;
          default:  st <= C_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    cmd       = '{op: CMD_NOP, sdata: 1'b0};
    pix_ready = (st == C_READY) && !host_download;
    res_valid = (st == C_RESULT);
    res_nz    = nz;
    res_event = nz[CENTRE];
    res_row   = row_q;
    res_col   = col_q;
    unique case (st)
      C_DL:   cmd = '{op: CMD_LOAD, sdata: sr[PRM_BITS-1]};
      C_INIT: cmd = '{op: CMD_INIT, sdata: 1'b0};
      C_ITER: cmd = '{op: CMD_ITER, sdata: 1'b0};
      default: ;
    endcase
  end
endmodule
