// ccd_interface: builds the columns of the 5x5 event window from the CCD
// pixel stream.
//
// Each accepted 8-bit pixel is given an odd parity bit and loaded into
// register E; it is also pushed into the first of four chained line FIFOs,
// each one row (LINE pixels) long. When a FIFO holds a full row it pops its
// oldest pixel into the next register up (D, C, B, A) and into the next FIFO.
// So after every pixel, registers A..E hold the column of the window whose
// newest pixel just arrived, A four rows above E. Until a FIFO has filled,
// its register receives the coded zero pixel. The column leaves on two
// physical copies (col_a, col_b) for duplication-with-comparison in the
// neurons.
//
// Row/column counters give the position of the newest pixel; win_valid says
// that the 5x5 window ending there lies inside one frame (row and column at
// least 4) and win_row/win_col give its centre. frame_start (a pulse before
// a frame's first pixel) clears counters and FIFOs.
//
// Handshake: a pixel is taken in a cycle with pix_valid and pix_ready both
// high; registers, col_* and win_* show the result from the next cycle on.
// FIFO sizes, the register chain and parity coding at the input follow the
// document; the zero fill, the counters and the handshake are this design's.
module ccd_interface
  import pe_pkg::*;
#(
  parameter int unsigned LINE = 512,
  parameter int unsigned ROWS = 512
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                frame_start,
  input  logic                pix_valid,
  input  logic [PIX_W-1:0]    pix_data,
  input  logic                pix_ready,
  output pix_t [WIN-1:0]      col_a,      // [0]=A (oldest row) .. [4]=E
  output pix_t [WIN-1:0]      col_b,
  output logic                win_valid,
  output logic [15:0]         win_row,
  output logic [15:0]         win_col
);
  localparam int unsigned NF = WIN - 1;   // four FIFOs

  logic              acc;
  pix_t              enc;
  pix_t [WIN-1:0]    regs;                // [4]=E fed by camera
  logic [NF-1:0]     f_full, f_push, f_pop;
  pix_t [NF-1:0]     f_din, f_dout;
  logic [15:0]       row, col;

  assign acc = pix_valid & pix_ready;
  assign enc = par_encode(pix_data);

  // FIFO k sits between register 4-k (below) and register 3-k (above).
  assign f_din[0]  = enc;
  assign f_push[0] = acc;
  for (genvar k = 1; k < int'(NF); k++) begin : g_link
    assign f_din[k]  = f_dout[k-1];
    assign f_push[k] = f_pop[k-1];
  end
  assign f_pop = f_push & f_full;

  for (genvar k = 0; k < int'(NF); k++) begin : g_fifo
    line_fifo #(.DEPTH(LINE), .WIDTH(PW)) u_fifo (
      .clk, .rst_n, .flush(frame_start),
      .push(f_push[k]), .din(f_din[k]), .pop(f_pop[k]), .dout(f_dout[k]),
      .full(f_full[k]), .empty()
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs      <= {WIN{PIX_ZERO}};
      row       <= '0;
      col       <= '0;
      win_valid <= 1'b0;
      win_row   <= '0;
      win_col   <= '0;
    end else if (frame_start) begin
      regs      <= {WIN{PIX_ZERO}};
      row       <= '0;
      col       <= '0;
      win_valid <= 1'b0;
    end else if (acc) begin
      regs[WIN-1] <= enc;
      for (int k = 0; k < int'(NF); k++)
        regs[WIN-2-k] <= f_pop[k] ? f_dout[k] : PIX_ZERO;
      win_valid <= (row >= 16'(WIN - 1)) && (col >= 16'(WIN - 1));
      win_row   <= row - 16'(WIN / 2);
      win_col   <= col - 16'(WIN / 2);
      if (col == 16'(LINE - 1)) begin
        col <= '0;
        row <= (row == 16'(ROWS - 1)) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  assign col_a = regs;
  assign col_b = regs;

  // Every word handed to the neurons carries valid parity.
  for (genvar r = 0; r < int'(WIN); r++) begin : g_par
    a_parity: assert property (@(posedge clk) disable iff (!rst_n) ^regs[r]);
  end
endmodule
