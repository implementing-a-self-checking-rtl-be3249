// tb_event_id_unit: drives the CMD bus and the window column directly. After
// a parameter download, random pixel columns are shifted in with INIT; for
// every complete window three ITER commands are issued (each once the unit
// is idle) and the 25-bit NZ pattern is compared with the reference model of
// the whole network. The ERROR bus must stay valid, and a column with a
// parity error must be reported by the receiving neuron of that board.
module tb_event_id_unit;
  import pe_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  cmd_t cmd;
  pix_t [4:0] col_a, col_b;
  logic [24:0] nz;
  logic [24:0][1:0] err;
  logic busy;
  int img [$][5];       // columns shifted in so far
  int checks = 0, failures = 0, n_nz = 0, n_empty = 0, n_bad = 0;

  event_id_unit dut (.*);

  always #5 clk = ~clk;

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
    col_a = {5{PIX_ZERO}}; col_b = col_a;
    repeat (2) @(posedge clk);
    rst_n = 1;
    w = '{2, 1, 0, 0, 1, -1}; th = 1160; t = 20;
    for (int k = 0; k < 6; k++) p.w[k] = 8'(w[k]);
    p.theta = 16'(th); p.temp = 12'(t);
    v = encode_params(p);
    for (int b = PRM_BITS - 1; b >= 0; b--) issue(CMD_LOAD, v[b]);
    for (int n = 0; n < 60; n++) begin
      int c [5], pix [25], s [25];
      logic [24:0] exp;
      for (int r = 0; r < 5; r++) begin
        c[r] = (n % 4 == 0) ? int'($urandom % 40) : 60 + int'($urandom % 160);
        col_a[r] = enc(c[r]);
      end
      col_b = col_a;
      img.push_front(c);
      issue(CMD_INIT, 1'b0);
      if (img.size() < 5) continue;
      // neuron 5r+k holds the pixel of row r shifted in k INITs ago
      for (int r = 0; r < 5; r++)
        for (int k = 0; k < 5; k++) pix[5*r+k] = img[k][r];
      run_window(pix, w, th, t, s);
      for (int j = 0; j < 25; j++) exp[j] = (s[j] != 0);
      for (int it = 0; it < 3; it++) begin
        issue(CMD_ITER, 1'b0);
        while (busy) @(negedge clk);
      end
      checks++;
      if (nz != exp) begin failures++; $display("nz fail n=%0d got %h exp %h", n, nz, exp); end
      if (exp != 0) n_nz++; else n_empty++;
      for (int j = 0; j < 25; j++) begin
        checks++;
        if (tr_bad(err[j])) begin failures++; $display("false error neuron %0d", j); end
      end
    end
    // a parity error on board 2's input must be caught by neuron 10
    col_a[2] = col_a[2] ^ 9'h001; col_b = col_a;
    @(negedge clk);
    cmd = '{op: CMD_INIT, sdata: 1'b0};
    @(negedge clk);
    cmd = '{op: CMD_NOP, sdata: 1'b0};
    checks++;
    if (!tr_bad(err[10])) begin failures++; $display("parity error not caught"); end
    checks++;
    if (n_nz == 0 || n_empty == 0) begin failures++; $display("coverage nz=%0d empty=%0d", n_nz, n_empty); end
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
