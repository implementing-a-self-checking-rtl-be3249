// sfs: Sigmoidal Function Section and state update of a self-checking neuron.
//
// From the 9N activation act9 = 9x and the 9N temperature t9 = 9T it forms
//   y = 0                    if x <= -128T
//   y = 255                  if x >=  128T
//   y = floor(128 + x/T)     otherwise,
// then applies the stability rule to the current 3N state s3 = 3s:
//   s_next = s  if |y - s| < s/4,  else 0.
// All values stay coded: y leaves as 3y, s_next as 3*s_next.
//
// How: the two saturation tests are made by two differently built
// comparators whose answers must agree. Inside the range the section divides
// 9(x + 128T) by 9T with eight restoring shift-and-subtract steps (one per
// quotient bit, most significant first), accumulating 3*quotient. After every
// step the partial remainder must be a multiple of 9 and the partial quotient
// a multiple of 3. The stability test is likewise duplicated, and y3 checked
// for divisibility by 3. Verdicts leave on the two-rail pair err.
//
// Timing: counting the edge that samples start (one cycle, with act9) as
// edge 0, done pulses for one cycle after edge 1 when the activation
// saturates and after edge 9 when it is divided; s3_next and y3 are then
// valid.
// The function, alpha = 0.25, division by iterated subtraction with a check
// after each iteration, and duplicated saturation comparison follow the
// document; the binary (restoring) form of the division and the duplicated
// stability test are this design's choices.
module sfs
  import pe_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [ACC_W-1:0] act9,
  input  logic [T9_W-1:0]         t9,
  input  logic [S3_W-1:0]         s3,
  output logic                    done,
  output logic [S3_W-1:0]         y3,
  output logic [S3_W-1:0]         s3_next,
  output logic [1:0]              err
);
  typedef enum logic [1:0] {S_IDLE, S_DIV, S_UPD} state_e;
  state_e                   st;
  logic signed [ACC_W-1:0]  rem, lim;
  logic [$clog2(QBITS)-1:0] k;
  logic                     div_chk;
  logic                     lo_a, hi_a, lo_b, hi_b, sat_bad;
  logic signed [ACC_W-1:0]  trial;
  logic signed [S3_W+4:0]   diff, mag4;
  logic                     stab_a, stab_b;
  logic [4:0][1:0]          tr;

  always_comb begin
    lim   = ACC_W'({1'b0, t9}) <<< SAT_SH;                 // 9 * 128T
    // comparator pair A: direct comparison with the limits
    lo_a  = act9 <= -lim;
    hi_a  = act9 >=  lim;
    // comparator pair B: sign of the shifted activation
    lo_b  = !((act9 + lim) > 0);
    hi_b  = !((act9 - lim) < 0);
    trial = rem - (ACC_W'({1'b0, t9}) <<< k);
    // stability: 4|y-s| < s, computed twice
    diff  = $signed({5'b0, y3}) - $signed({5'b0, s3});
    mag4  = (diff < 0 ? -diff : diff) <<< ALPHA_SHIFT;
    stab_a = mag4 < $signed({5'b0, s3});
    stab_b = ($signed({5'b0, s3}) - mag4) > 0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      rem     <= '0;
      k       <= '0;
      y3      <= '0;
      s3_next <= '0;
      done    <= 1'b0;
      div_chk <= 1'b0;
      sat_bad <= 1'b0;
    end else begin
      done    <= 1'b0;
      div_chk <= 1'b0;
      sat_bad <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          sat_bad <= (lo_a != lo_b) || (hi_a != hi_b);
          if (lo_a) begin
            y3 <= '0;
            st <= S_UPD;
          end else if (hi_a) begin
            y3 <= S3_MAX;
            st <= S_UPD;
          end else begin
            rem <= act9 + lim;
            y3  <= '0;
            k   <= ($clog2(QBITS))'(QBITS - 1);
            st  <= S_DIV;
          end
        end
        S_DIV: begin
          if (trial >= 0) begin
            rem <= trial;
            y3  <= y3 + (S3_W'(3) << k);
          end
          div_chk <= 1'b1;
          k <= k - 1'b1;
          if (k == '0) st <= S_UPD;
        end
        S_UPD: begin
          s3_next <= stab_a ? s3 : '0;
          sat_bad <= stab_a != stab_b;
          done    <= 1'b1;
          st      <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  residue_checker #(.W(ACC_W), .A(9)) u_rem (.value(rem), .en(div_chk), .tr(tr[0]));
  residue_checker #(.W(S3_W + 1), .A(3)) u_q (.value({1'b0, y3}), .en(div_chk | done), .tr(tr[1]));
  residue_checker #(.W(S3_W + 1), .A(3)) u_s (.value({1'b0, s3_next}), .en(done), .tr(tr[2]));
  assign tr[3] = {rem[0], ~(rem[0] ^ sat_bad)};
  residue_checker #(.W(T9_W + 1), .A(9)) u_t (.value({1'b0, t9}), .en(start), .tr(tr[4]));

  two_rail_checker #(.N(5)) u_trc (.in_tr(tr), .out_tr(err));
endmodule
