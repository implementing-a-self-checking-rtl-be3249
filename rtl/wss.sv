// wss: Weighted Sum Section of a self-checking neuron.
//
// The 25 neuron states arrive bit-serially, least significant bit first, one
// bit per neuron per cycle on the SIN25 lines, for S3_W (10) cycles, each
// state being 3N-coded. The section sorts the 25 lines into the six weight
// classes and, each cycle, adds the number of ones seen in a class, shifted by
// the bit position, to that class's sum; after the last bit each class sum is
// the plain sum of the 3N states in the class. A pipeline stage then
// multiplies each class sum by its 3N weight, and a second stage adds the six
// 9N products and subtracts the 9N threshold:
//     act9 = 9 * ( sum_i w_class(i) * s_i  -  theta ).
//
// Timing: counting the clock edge that samples start as edge 0, bit k of
// every state must be on SIN25 between edges k and k+1 (k = 0..9); products
// are registered at edge 11 and act9 at edge 12, when act_valid rises for
// one cycle.
//
// Checks (two-rail pair err): the two physical copies of SIN25 must agree
// while bits are received; class sums must be multiples of 3; products and
// the activation multiples of 9. Grouping by class, multiplying class sums and
// AN-code protection follow the document; the bit-serial popcount
// accumulation is this design's way of summing serial inputs.
module wss
  import pe_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [N_NEUR-1:0]      sin_a,
  input  logic [N_NEUR-1:0]      sin_b,
  input  coded_params_t          prm,
  output logic signed [ACC_W-1:0] act9,
  output logic                   act_valid,
  output logic [1:0]             err
);
  logic                              rx_on, mul_go, add_go;
  logic [$clog2(S3_W)-1:0]           bitn;
  logic [N_CLASS-1:0][CS_W-1:0]      cs;
  logic signed [PROD_W-1:0]          prod [N_CLASS];
  logic [N_CLASS-1:0][3:0]           pc;
  logic                              dup_bad;
  logic signed [ACC_W-1:0]           sum;
  logic [2*N_CLASS+1:0][1:0]         tr;

  // Adder stage: sum of the six products minus the threshold.
  always_comb begin
    sum = -ACC_W'($signed(prm.th9));
    for (int k = 0; k < int'(N_CLASS); k++) sum = sum + ACC_W'(prod[k]);
  end

  // Ones per class in the current bit slice.
  always_comb begin
    pc = '0;
    for (int i = 0; i < int'(N_NEUR); i++)
      pc[class_of(i)] = pc[class_of(i)] + 4'(sin_a[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_on     <= 1'b0;
      mul_go    <= 1'b0;
      add_go    <= 1'b0;
      act_valid <= 1'b0;
      bitn      <= '0;
      cs        <= '0;
      act9      <= '0;
      for (int k = 0; k < int'(N_CLASS); k++) prod[k] <= '0;
      dup_bad   <= 1'b0;
    end else begin
      mul_go    <= 1'b0;
      add_go    <= mul_go;
      act_valid <= add_go;
      dup_bad   <= rx_on && (sin_a != sin_b);
      if (start) begin
        rx_on <= 1'b1;
        bitn  <= '0;
        cs    <= '0;
      end else if (rx_on) begin
        for (int k = 0; k < int'(N_CLASS); k++)
          cs[k] <= cs[k] + (CS_W'(pc[k]) << bitn);
        bitn <= bitn + 1'b1;
        if (bitn == ($clog2(S3_W))'(S3_W - 1)) begin
          rx_on  <= 1'b0;
          mul_go <= 1'b1;
        end
      end
      if (mul_go)
        for (int k = 0; k < int'(N_CLASS); k++)
          prod[k] <= $signed({1'b0, cs[k]}) * $signed(prm.w3[k]);
      if (add_go) act9 <= sum;
    end
  end

  for (genvar k = 0; k < int'(N_CLASS); k++) begin : g_chk
    residue_checker #(.W(CS_W + 1), .A(3)) u_cs (.value({1'b0, cs[k]}), .en(mul_go), .tr(tr[k]));
    residue_checker #(.W(PROD_W), .A(9)) u_pr (.value(prod[k]), .en(add_go), .tr(tr[N_CLASS+k]));
  end
  residue_checker #(.W(ACC_W), .A(9)) u_act (.value(act9), .en(act_valid), .tr(tr[2*N_CLASS]));
  assign tr[2*N_CLASS+1] = {cs[0][0], ~(cs[0][0] ^ dup_bad)};

  two_rail_checker #(.N(2*N_CLASS + 2)) u_trc (.in_tr(tr), .out_tr(err));
endmodule
