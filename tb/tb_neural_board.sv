// tb_neural_board: one board placed as row R = 1 of the window, the other
// four rows modelled by the testbench and driven onto SIN25. Pixels enter
// through the board input one INIT at a time; for every window, once the
// board's row is full, three iterations run and the board's five NZ flags
// must match the reference model of the whole network, with the ERROR pairs
// valid throughout. A pixel copy mismatch at the input must be reported by
// the first neuron only.
module tb_neural_board;
  import pe_pkg::*;
  import tb_ref_pkg::*;
  localparam int R = 1;
  logic clk = 0, rst_n = 0;
  cmd_t cmd;
  pix_t in_a, in_b;
  logic [24:0] sin_a, sin_b, ext;
  logic [4:0] sout_a, sout_b, nz;
  logic [4:0][1:0] err;
  logic busy;
  int fed [$];
  int checks = 0, failures = 0, n_nz = 0, n_zero = 0;

  neural_board dut (.*);

  always #5 clk = ~clk;
  always_comb begin
    sin_a = ext; sin_b = ext;
    sin_a[R*5 +: 5] = sout_a;
    sin_b[R*5 +: 5] = sout_b;
  end

  function automatic pix_t enc(input int p);
    logic [7:0] d;
    d = 8'(p);
    return {~(^d), d};
  endfunction

  task automatic issue(input cmd_op_e op, input logic b);
    @(negedge clk);
    cmd = '{op: op, sdata: b};
    @(negedge clk);
    cmd = '{op: CMD_NOP, sdata: 1'b0};
  endtask

  initial begin
    params_t p;
    logic [PRM_BITS-1:0] v;
    int w [6], th, t;
    cmd = '{op: CMD_NOP, sdata: 1'b0};
    in_a = PIX_ZERO; in_b = PIX_ZERO; ext = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    w = '{2, 1, 0, 0, 1, -1}; th = 1160; t = 20;
    for (int k = 0; k < 6; k++) p.w[k] = 8'(w[k]);
    p.theta = 16'(th); p.temp = 12'(t);
    v = encode_params(p);
    for (int b = PRM_BITS - 1; b >= 0; b--) issue(CMD_LOAD, v[b]);
    for (int n = 0; n < 40; n++) begin
      int s [25], y;
      logic [4:0] exp;
      fed.push_front(60 + int'($urandom % 160));
      in_a = enc(fed[0]); in_b = in_a;
      issue(CMD_INIT, 1'b0);
      if (fed.size() < 5) continue;
      for (int j = 0; j < 25; j++)
        s[j] = (j / 5 == R) ? fed[j % 5] : 60 + int'($urandom % 160);
      for (int it = 0; it < 3; it++) begin
        y = sigma(activation(s, w, th), t);
        @(negedge clk);
        cmd = '{op: CMD_ITER, sdata: 1'b0};
        @(negedge clk);
        cmd = '{op: CMD_NOP, sdata: 1'b0};
        for (int b = 0; b < 10; b++) begin
          for (int i = 0; i < 25; i++) ext[i] = 1'(((3 * s[i]) >> b) & 1);
          @(negedge clk);
        end
        ext = '0;
        while (busy) @(negedge clk);
        for (int j = 0; j < 25; j++) s[j] = next_state(y, s[j]);
      end
      for (int k = 0; k < 5; k++) exp[k] = (s[R*5+k] != 0);
      checks++;
      if (nz != exp) begin failures++; $display("nz fail n=%0d got %b exp %b", n, nz, exp); end
      if (exp != 0) n_nz++; else n_zero++;
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (tr_bad(err[k])) begin failures++; $display("false error at %0d", k); end
      end
    end
    in_a = enc(77); in_b = enc(76) ^ 9'h100;
    issue(CMD_INIT, 1'b0);
    checks++;
    if (!tr_bad(err[0]) || tr_bad(err[1])) begin failures++; $display("input mismatch error %b", err); end
    checks++;
    if (n_nz == 0 || n_zero == 0) begin failures++; $display("coverage nz=%0d zero=%0d", n_nz, n_zero); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
