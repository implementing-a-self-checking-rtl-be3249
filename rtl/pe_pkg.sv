// pe_pkg: widths, bus types and small helper functions shared by the photon
// event identification system.
//
// Pixels are 8-bit and travel with one odd-parity bit as a 9-bit word
// {parity, pixel}. Inside a neuron the state is kept in the 3N arithmetic code
// (value times 3), weights are 3N-coded and the threshold and temperature are
// 9N-coded (value times 9), so every product and sum in the weighted-sum path
// is a multiple of 9 when fault free. Eight-bit neuron values, 3N/9N coding,
// six weight classes and the 5x5 window follow the document; the threshold and
// temperature widths, the parity sense and the command-bus encoding are this
// design's own choices.
package pe_pkg;

  localparam int unsigned PIX_W   = 8;                  // pixel / neuron value
  localparam int unsigned PW      = PIX_W + 1;          // parity-coded pixel word
  localparam int unsigned WIN     = 5;                  // event window is WIN x WIN
  localparam int unsigned N_NEUR  = WIN * WIN;          // 25 neurons
  localparam int unsigned CENTRE  = N_NEUR / 2;         // neuron 12
  localparam int unsigned N_CLASS = 6;                  // independent weights

  localparam int unsigned W_W     = 8;                  // weight (signed)
  localparam int unsigned W3_W    = W_W + 2;            // 3N weight (signed)
  localparam int unsigned TH_W    = 16;                 // threshold (signed)
  localparam int unsigned TH9_W   = TH_W + 4;           // 9N threshold (signed)
  localparam int unsigned T_W     = 12;                 // temperature (unsigned)
  localparam int unsigned T9_W    = T_W + 4;            // 9N temperature (unsigned)
  localparam int unsigned S3_W    = PIX_W + 2;          // 3N state, 0..765
  localparam int unsigned CS_W    = S3_W + 3;           // class sum of up to 8 states
  localparam int unsigned PROD_W  = CS_W + W3_W + 1;    // signed class product
  localparam int unsigned ACC_W   = 26;                 // 9N activation (signed)
  localparam int unsigned QBITS   = PIX_W;              // quotient bits of sigma_T
  localparam int unsigned SAT_SH  = 7;                  // saturation at +-128*T
  localparam int unsigned ITERATIONS = 3;               // iterations per window
  localparam int unsigned ALPHA_SHIFT = 2;              // alpha = 1/4

  localparam logic [S3_W-1:0] S3_MAX = S3_W'(3 * ((1 << PIX_W) - 1));

  typedef logic [PW-1:0] pix_t;

  // Coded zero pixel: data 0, odd parity bit set.
  localparam pix_t PIX_ZERO = pix_t'(1 << PIX_W);

  typedef enum logic [1:0] {
    CMD_NOP  = 2'd0,   // nothing
    CMD_LOAD = 2'd1,   // shift sdata into every Serial_in_Param_Reg
    CMD_INIT = 2'd2,   // move the window one pixel, reload the states
    CMD_ITER = 2'd3    // run one network iteration
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e op;
    logic    sdata;
  } cmd_t;

  // Parameters as the host supplies them.
  typedef struct packed {
    logic [N_CLASS-1:0][W_W-1:0] w;      // signed weights, class 0..5
    logic [TH_W-1:0]             theta;  // signed threshold
    logic [T_W-1:0]              temp;   // temperature T
  } params_t;

  // Parameters as stored in each neuron: 3N weights, 9N threshold/temperature.
  typedef struct packed {
    logic [N_CLASS-1:0][W3_W-1:0] w3;
    logic [TH9_W-1:0]             th9;
    logic [T9_W-1:0]              t9;
  } coded_params_t;

  localparam int unsigned PRM_BITS = $bits(coded_params_t);

  // Odd parity: the nine bits of a valid word hold an odd number of ones.
  function automatic pix_t par_encode(input logic [PIX_W-1:0] d);
    return {~(^d), d};
  endfunction

  function automatic coded_params_t encode_params(input params_t p);
    coded_params_t c;
    for (int k = 0; k < int'(N_CLASS); k++)
      c.w3[k] = W3_W'(3 * $signed(p.w[k]));
    c.th9 = TH9_W'(9 * $signed(p.theta));
    c.t9  = T9_W'(9 * p.temp);
    return c;
  endfunction

  // Weight class of window position i (row i/5, column i%5): the unordered
  // pair of distances from the window centre. Classes 0..5 stand for
  // (0,0) (0,1) (1,1) (0,2) (1,2) (2,2).
  function automatic int unsigned class_of(input int unsigned i);
    int unsigned dr, dc, lo, hi;
    dr = (i / WIN > 2) ? i / WIN - 2 : 2 - i / WIN;
    dc = (i % WIN > 2) ? i % WIN - 2 : 2 - i % WIN;
    lo = (dr < dc) ? dr : dc;
    hi = (dr < dc) ? dc : dr;
    if (hi == 0)      return 0;
    else if (hi == 1) return (lo == 0) ? 1 : 2;
    else              return 3 + lo;
  endfunction

  // A two-rail pair is a valid (fault-free) code word when its rails differ.
  function automatic logic tr_bad(input logic [1:0] t);
    return t[1] == t[0];
  endfunction

endpackage
