// tb_nn_controller: the controller against a behavioural stand-in for the
// neurons and the CCD interface. Checks: the LOAD bit stream equals the
// 3N/9N-coded host parameters, MSB first, PRM_BITS long; every accepted
// pixel is followed by one INIT; a complete window gets exactly three ITER
// commands, each only after busy has fallen, then one result carrying the
// NZ pattern, the centre-flag verdict and the window centre; an incomplete
// window gets none. A non-code ERROR pair must set the neuron's sticky error
// bit. Finally one controller copy is upset: results must stay correct and
// err_tmr must rise.
module tb_nn_controller;
  import pe_pkg::*;
  logic clk = 0, rst_n = 0;
  params_t host_params;
  logic host_download = 0, pix_valid = 0, win_valid = 0, busy = 0;
  logic [15:0] win_row = '0, win_col = '0;
  logic [24:0] nz = '0;
  logic [24:0][1:0] err_bus;
  logic params_loaded, pix_ready, res_valid, res_event, err_flag, err_tmr;
  cmd_t cmd;
  logic [24:0] res_nz, err_neurons;
  logic [15:0] res_row, res_col;
  int checks = 0, failures = 0, n_results = 0, n_skipped = 0;

  nn_controller dut (.*);

  always #5 clk = ~clk;

  task automatic download();
    logic [PRM_BITS-1:0] v;
    int nb;
    for (int k = 0; k < 6; k++) host_params.w[k] = 8'($urandom);
    host_params.theta = 16'($urandom);
    host_params.temp  = 12'($urandom);
    v = encode_params(host_params);
    @(negedge clk); host_download = 1;
    @(negedge clk); host_download = 0;
    nb = 0;
    while (cmd.op == CMD_LOAD) begin
      checks++;
      if (cmd.sdata != v[PRM_BITS-1-nb]) begin failures++; $display("load bit %0d wrong", nb); end
      nb++;
      @(negedge clk);
    end
    checks++;
    if (nb != PRM_BITS || !params_loaded) begin failures++; $display("load length %0d", nb); end
  endtask

  task automatic one_pixel(input bit valid_win, input int r, input int c, input bit upset = 0);
    int wait_n, n_iter;
    logic [24:0] pat;
    @(negedge clk);
    pix_valid = 1;
    while (!pix_ready) @(negedge clk);
    @(posedge clk);          // accepted; the CCD interface now shows the window
    win_valid = valid_win; win_row = 16'(r); win_col = 16'(c);
    pat = 25'($urandom);
    nz = pat;
    @(negedge clk);
    pix_valid = 0;
    checks++;
    if (cmd.op != CMD_INIT) begin failures++; $display("no INIT after pixel"); end
    n_iter = 0;
    for (int k = 0; k < 200 && !res_valid && !(pix_ready && !valid_win); k++) begin
      @(negedge clk);
      if (cmd.op == CMD_ITER) begin
        checks++;
        if (busy) begin failures++; $display("ITER while busy"); end
        n_iter++;
        busy = 1;
        if (upset && n_iter == 1) begin
          // corrupt the captured window row in one controller copy
          force dut.g_copy[1].u_core.row_q = 16'hdead;
          @(negedge clk);
          release dut.g_copy[1].u_core.row_q;
        end
        repeat (1 + $urandom % 30) @(negedge clk);
        busy = 0;
      end
    end
    if (valid_win) begin
      checks++;
      if (!res_valid || n_iter != 3 || res_nz != pat || res_event != pat[12] ||
          res_row != 16'(r) || res_col != 16'(c)) begin
        failures++; $display("result fail iter=%0d valid=%b", n_iter, res_valid);
      end
      n_results++;
    end else begin
      checks++;
      if (n_iter != 0 || res_valid) begin failures++; $display("incomplete window analysed"); end
      n_skipped++;
    end
  endtask

  initial begin
    for (int j = 0; j < 25; j++) err_bus[j] = 2'b10;
    repeat (2) @(posedge clk);
    rst_n = 1;
    download();
    for (int i = 0; i < 40; i++) begin
      one_pixel(i % 3 != 0, i, 2 * i);
      if (i == 20) download();
    end
    checks++;
    if (err_flag || err_tmr) begin failures++; $display("false error flag"); end
    // neuron 6 reports a non-code pair for one cycle
    @(negedge clk); err_bus[6] = 2'b11;
    @(negedge clk); err_bus[6] = 2'b01;
    @(negedge clk);
    checks++;
    if (err_neurons != 25'(1 << 6) || !err_flag) begin failures++; $display("error not latched %h", err_neurons); end
    // upset one copy of the controller
    for (int i = 0; i < 6; i++) one_pixel(1, 100 + i, i, i == 2);
    checks++;
    if (!err_tmr) begin failures++; $display("TMR disagreement not flagged"); end
    checks++;
    if (n_results == 0 || n_skipped == 0) begin failures++; $display("coverage"); end
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
