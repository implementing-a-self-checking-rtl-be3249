// tb_wss: random 25-neuron states and random 3N/9N parameters; the states are
// sent bit-serially (LSB first, both SIN25 copies) and the 9N activation must
// equal 9 * (sum_i w_class(i) s_i - theta) from the reference model, with
// act_valid exactly 12 edges after start. Runs with one line differing
// between the two copies must produce a non-code error pair.
module tb_wss;
  import pe_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [24:0] sin_a = '0, sin_b = '0;
  coded_params_t prm;
  logic signed [ACC_W-1:0] act9;
  logic act_valid;
  logic [1:0] err;
  int checks = 0, failures = 0, cyc = 0;

  wss dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic run(input bit inject);
    int s [25], w [6], th, exp, c0, bad_seen;
    for (int i = 0; i < 25; i++) s[i] = int'($urandom % 256);
    for (int k = 0; k < 6; k++) begin
      w[k] = int'($urandom % 256) - 128;
      prm.w3[k] = 10'(3 * w[k]);
    end
    th = int'($urandom % 65536) - 32768;
    prm.th9 = 20'(9 * th);
    prm.t9  = 16'(9 * 7);
    exp = 9 * activation(s, w, th);
    bad_seen = 0;
    @(negedge clk);
    start = 1;
    @(posedge clk);
    @(negedge clk);
    c0 = cyc;
    start = 0;
    for (int b = 0; b < 10; b++) begin
      for (int i = 0; i < 25; i++) sin_a[i] = 1'(((3 * s[i]) >> b) & 1);
      sin_b = sin_a;
      if (inject && b == 3) sin_b[b] = ~sin_b[b];
      @(negedge clk);
      if (tr_bad(err)) bad_seen++;
    end
    sin_a = '0; sin_b = '0;
    while (!act_valid) begin
      @(negedge clk);
      if (tr_bad(err)) bad_seen++;
    end
    checks++;
    if (!inject && act9 != ACC_W'(exp)) begin failures++; $display("act fail %0d vs %0d", act9, exp); end
    checks++;
    if (cyc - c0 != 12) begin failures++; $display("latency %0d", cyc - c0); end
    checks++;
    if ((bad_seen != 0) != inject) begin failures++; $display("err fail inject=%0b seen=%0d", inject, bad_seen); end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 150; n++) run(n % 5 == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
