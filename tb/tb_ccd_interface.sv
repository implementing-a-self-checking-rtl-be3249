// tb_ccd_interface: streams random pixels (random gaps on both sides of the
// handshake) through a 6-pixel-wide, 7-row CCD interface over several frames,
// with and without frame_start, and compares after every accepted pixel the
// five column registers (both copies, with parity), win_valid and the window
// centre against a model that indexes the pixel stream directly.
module tb_ccd_interface;
  import pe_pkg::*;
  localparam int LINE = 6, ROWS = 7;
  logic clk = 0, rst_n = 0, frame_start = 0, pix_valid = 0, pix_ready = 0;
  logic [7:0] pix_data = '0;
  pix_t [4:0] col_a, col_b;
  logic win_valid;
  logic [15:0] win_row, win_col;
  int stream [$];
  int checks = 0, failures = 0, n_valid = 0, n_fill = 0;
  int row, col;

  ccd_interface #(.LINE(LINE), .ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  function automatic pix_t enc(input int p);
    logic [7:0] d;
    d = 8'(p);
    return {~(^d), d};
  endfunction

  task automatic check_after(input int r, input int c);
    int n;
    n = stream.size() - 1;
    for (int m = 0; m < 5; m++) begin
      pix_t exp;
      exp = (n - m * LINE >= 0) ? enc(stream[n - m * LINE]) : pix_t'(9'h100);
      if (n - m * LINE < 0) n_fill++;
      checks++;
      if (col_a[4-m] != exp || col_b[4-m] != exp) begin
        failures++;
        $display("reg %0d fail n=%0d got %h exp %h", 4-m, n, col_a[4-m], exp);
      end
    end
    checks++;
    if (win_valid != (r >= 4 && c >= 4)) begin failures++; $display("win_valid fail r=%0d c=%0d", r, c); end
    if (win_valid) begin
      n_valid++;
      checks++;
      if (win_row != 16'(r - 2) || win_col != 16'(c - 2)) begin
        failures++; $display("centre fail %0d %0d vs %0d %0d", win_row, win_col, r-2, c-2);
      end
    end
  endtask

  task automatic run_frame(input bit with_start);
    if (with_start) begin
      @(negedge clk); frame_start = 1;
      @(negedge clk); frame_start = 0;
      stream.delete();
      row = 0; col = 0;
    end
    for (int i = 0; i < LINE * ROWS; i++) begin
      int p;
      p = int'($urandom % 256);
      @(negedge clk);
      pix_data  = 8'(p);
      pix_valid = 1;
      pix_ready = ($urandom % 4 != 0);
      while (!pix_ready) begin
        @(negedge clk);
        pix_ready = ($urandom % 4 != 0);
      end
      @(posedge clk);
      #1;
      pix_valid = 0; pix_ready = 0;
      stream.push_back(p);
      check_after(row, col);
      col++;
      if (col == LINE) begin col = 0; row = (row + 1) % ROWS; end
      if ($urandom % 3 == 0) @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_frame(1);
    run_frame(1);
    run_frame(0);
    checks++;
    if (n_valid != 3 * (LINE - 4) * (ROWS - 4)) begin
      failures++; $display("valid windows %0d", n_valid);
    end
    checks++;
    if (n_fill == 0) begin failures++; $display("FIFO fill never seen"); end
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
