// tb_neuron: one neuron placed at window position J = 7 among 24 neighbours
// that the testbench models. Parameters are downloaded serially, the neuron
// is initialised with a pixel, and three iterations are run with the
// neighbours' states driven on SIN25 and the neuron's own serial output fed
// back to its line. After each iteration the neuron's state and NZ flag must
// match the reference model, busy must last 23 cycles (divided) or 15
// (saturated), the pixel must come out of the chain on the next INIT, and the
// error pair must stay valid. Runs with a corrupted SIN25 copy or a bad
// parity pixel must be flagged.
module tb_neuron;
  import pe_pkg::*;
  import tb_ref_pkg::*;
  localparam int J = 7;
  logic clk = 0, rst_n = 0;
  cmd_t cmd;
  pix_t sta_a, sta_b, pass_a, pass_b;
  logic [24:0] sin_a, sin_b;
  logic sout_a, sout_b, nz, busy;
  logic [1:0] err;
  logic [24:0] ext;
  logic corrupt = 0;
  int checks = 0, failures = 0, bad_seen = 0;
  int n_div = 0, n_sat = 0;

  neuron dut (.*);

  always #5 clk = ~clk;
  always_comb begin
    sin_a = ext;  sin_a[J] = sout_a;
    sin_b = ext;  sin_b[J] = sout_b;
    if (corrupt) sin_b[0] = ~sin_b[0];
  end
  always @(negedge clk) if (rst_n && tr_bad(err)) bad_seen++;

  function automatic pix_t enc(input int p);
    logic [7:0] d;
    d = 8'(p);
    return {~(^d), d};
  endfunction

  task automatic send(input cmd_op_e op, input logic b);
    @(negedge clk);
    cmd = '{op: op, sdata: b};
    @(negedge clk);
    cmd = '{op: CMD_NOP, sdata: 1'b0};
  endtask

  task automatic download(input int w [6], input int th, input int t);
    params_t p;
    logic [PRM_BITS-1:0] v;
    for (int k = 0; k < 6; k++) p.w[k] = 8'(w[k]);
    p.theta = 16'(th);
    p.temp  = 12'(t);
    v = encode_params(p);
    for (int b = PRM_BITS - 1; b >= 0; b--) begin
      @(negedge clk);
      cmd = '{op: CMD_LOAD, sdata: v[b]};
    end
    @(negedge clk);
    cmd = '{op: CMD_NOP, sdata: 1'b0};
  endtask

  // One iteration: serialise the neighbours' states while the neuron runs.
  task automatic iterate(input int s [25], output int busy_len);
    @(negedge clk);
    cmd = '{op: CMD_ITER, sdata: 1'b0};
    @(negedge clk);
    cmd = '{op: CMD_NOP, sdata: 1'b0};
    busy_len = 0;
    for (int b = 0; b < 10; b++) begin
      for (int i = 0; i < 25; i++) ext[i] = 1'(((3 * s[i]) >> b) & 1);
      busy_len++;
      @(negedge clk);
    end
    ext = '0;
    while (busy) begin
      busy_len++;
      @(negedge clk);
    end
  endtask

  task automatic window(input int w [6], input int th, input int t, input bit inject);
    int s [25], y, blen, exp_len, bs0;
    for (int i = 0; i < 25; i++) s[i] = 60 + int'($urandom % 140);
    bs0 = bad_seen;
    @(negedge clk);
    sta_a = enc(s[J]); sta_b = enc(s[J]);
    if (inject) sta_b = sta_b ^ 9'h100;
    cmd = '{op: CMD_INIT, sdata: 1'b0};
    @(negedge clk);
    cmd = '{op: CMD_NOP, sdata: 1'b0};
    sta_a = PIX_ZERO; sta_b = PIX_ZERO;
    checks++;
    if (pass_a != enc(s[J]) || dut.s3 != 10'(3 * s[J])) begin failures++; $display("init fail"); end
    for (int it = 0; it < 3; it++) begin
      int x;
      x = activation(s, w, th);
      y = sigma(x, t);
      exp_len = (x <= -128 * t || x >= 128 * t) ? 15 : 23;
      if (exp_len == 15) n_sat++; else n_div++;
      iterate(s, blen);
      for (int i = 0; i < 25; i++) s[i] = next_state(y, s[i]);
      checks++;
      if (dut.s3 != 10'(3 * s[J]) || nz != (s[J] != 0)) begin
        failures++; $display("state fail it=%0d got %0d exp %0d", it, dut.s3, 3 * s[J]);
      end
      checks++;
      if (blen != exp_len) begin failures++; $display("busy length %0d exp %0d", blen, exp_len); end
    end
    checks++;
    if ((bad_seen != bs0) != inject) begin failures++; $display("error flag fail inject=%0b", inject); end
  endtask

  initial begin
    int w [6], th, t;
    cmd = '{op: CMD_NOP, sdata: 1'b0};
    sta_a = PIX_ZERO; sta_b = PIX_ZERO; ext = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    w = '{4, 2, 1, 1, 0, -1};
    th = 1940; t = 15;
    download(w, th, t);
    checks++;
    if (dut.u_prm.prm.t9 != 16'(9 * 15)) begin failures++; $display("download fail"); end
    for (int n = 0; n < 30; n++) begin
      if (n % 10 == 5) begin
        for (int k = 0; k < 6; k++) w[k] = int'($urandom % 9) - 4;
        th = int'($urandom % 4000) - 1000;
        t = 1 + int'($urandom % 40);
        download(w, th, t);
      end
      window(w, th, t, n % 7 == 6);
    end
    // corrupted SIN25 copy during an iteration
    begin
      int s [25], blen, bs0;
      for (int i = 0; i < 25; i++) s[i] = 100;
      bs0 = bad_seen;
      corrupt = 1;
      iterate(s, blen);
      corrupt = 0;
      checks++;
      if (bad_seen == bs0) begin failures++; $display("SIN duplication error not flagged"); end
    end
    checks++;
    if (n_sat == 0 || n_div == 0) begin failures++; $display("coverage sat=%0d div=%0d", n_sat, n_div); end
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
