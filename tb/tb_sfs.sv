// tb_sfs: random activations around and beyond the saturation limits, random
// temperatures and states near and far from the output; y3 must be 3*sigma_T
// and s3_next 3 times the stability-rule state, done must rise 1 edge after
// start when saturated and 9 when divided, and the error pair must stay
// valid. A temperature word that is not a multiple of 9 must be flagged.
module tb_sfs;
  import pe_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [ACC_W-1:0] act9 = '0;
  logic [T9_W-1:0] t9 = '0;
  logic [S3_W-1:0] s3 = '0, y3, s3_next;
  logic done;
  logic [1:0] err;
  int checks = 0, failures = 0, cyc = 0;
  int n_lo = 0, n_hi = 0, n_div = 0, n_keep = 0, n_zero = 0;

  sfs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic run(input int x, input int t, input int s, input bit bad_t);
    int y, sn, c0, bad_seen, lat;
    y  = sigma(x, t);
    sn = next_state(y, s);
    bad_seen = 0;
    @(negedge clk);
    act9 = ACC_W'(9 * x); t9 = T9_W'(9 * t + (bad_t ? 1 : 0)); s3 = S3_W'(3 * s); start = 1;
    @(posedge clk);
    @(negedge clk);
    c0 = cyc;
    if (tr_bad(err)) bad_seen++;
    start = 0;
    while (!done) begin
      @(negedge clk);
      if (tr_bad(err)) bad_seen++;
    end
    lat = cyc - c0;
    if (bad_t) begin
      checks++;
      if (bad_seen == 0) begin failures++; $display("bad temperature not flagged"); end
      return;
    end
    if (x <= -128 * t) n_lo++; else if (x >= 128 * t) n_hi++; else n_div++;
    if (sn != 0) n_keep++; else n_zero++;
    checks++;
    if (y3 != S3_W'(3 * y) || s3_next != S3_W'(3 * sn)) begin
      failures++; $display("fail x=%0d t=%0d s=%0d: y3=%0d (%0d) s3n=%0d (%0d)", x, t, s, y3, 3*y, s3_next, 3*sn);
    end
    checks++;
    if (lat != ((x <= -128 * t || x >= 128 * t) ? 1 : 9)) begin failures++; $display("latency %0d", lat); end
    checks++;
    if (bad_seen != 0) begin failures++; $display("false error x=%0d t=%0d", x, t); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int t, x, s, y;
      t = 1 + int'($urandom % 4095);
      if (n % 3 == 0) t = 1 + int'($urandom % 40);
      x = int'($urandom % (300 * t + 1)) - 150 * t;
      y = sigma(x, t);
      s = (n % 2 == 0) ? int'($urandom % 256) : ((y * 10 + int'($urandom % 5)) / 10);
      run(x, t, s, 0);
    end
    run(-128 * 20, 20, 30, 0);    // exactly at the low limit
    run( 128 * 20, 20, 30, 0);    // exactly at the high limit
    run(100, 50, 100, 1);
    checks++;
    if (n_lo == 0 || n_hi == 0 || n_div == 0 || n_keep == 0 || n_zero == 0) begin
      failures++; $display("coverage lo=%0d hi=%0d div=%0d keep=%0d zero=%0d", n_lo, n_hi, n_div, n_keep, n_zero);
    end
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
