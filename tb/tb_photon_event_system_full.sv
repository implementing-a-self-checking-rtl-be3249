// tb_photon_event_system_full: the whole system at its default size: one full
// 512 x 512 frame, every one of its 508 x 508 complete windows checked.
//
// A random test image of bands (dark, mid-grey, bright) is streamed through
// the camera port with random gaps after a parameter download. Every result
// must arrive in raster order of the complete windows, and its NZ pattern
// and event verdict must match the reference model run on the same 5x5
// pixels. The testbench counts the mechanisms the run exercised: camera
// stalls, line-FIFO filling, skipped incomplete windows, low and high
// saturation and division in sigma_T, states kept and cleared by the
// stability rule, windows with and without an event; a mechanism that
// never happened counts as a failure.
module tb_photon_event_system_full;
  import pe_pkg::*;
  import tb_ref_pkg::*;
  localparam int LINE = 512, ROWS = 512, FRAMES = 1;
  logic clk = 0, rst_n = 0, frame_start = 0, pix_valid = 0, host_download = 0;
  logic [7:0] pix_data = '0;
  params_t host_params;
  logic pix_ready, params_loaded, res_valid, res_event, err_flag, err_tmr;
  logic [24:0] res_nz, err_neurons;
  logic [15:0] res_row, res_col;
  int img [ROWS][LINE];
  int exp_r [$], exp_c [$];
  int w [6], th, t;
  int checks = 0, failures = 0;
  int n_stall = 0, n_fill = 0, n_skip = 0, n_lo = 0, n_hi = 0, n_div = 0;
  int n_keep = 0, n_clear = 0, n_event = 0, n_noevent = 0, n_results = 0, n_dl = 0;
  int n_err = 0, n_tmr = 0;

  photon_event_system  dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (pix_valid && !pix_ready && params_loaded) n_stall++;
  always @(posedge clk) if (pix_valid && pix_ready && dut.u_ccd.regs[0] == PIX_ZERO && dut.u_ccd.f_full != 4'hf) n_fill++;
  always @(posedge clk) if (dut.u_ctrl.voted.cmd.op == CMD_INIT && !dut.win_valid) n_skip++;

  // Model of one window, with mechanism counting.
  task automatic model(input int cr, input int cc, output logic [24:0] pat);
    int s [25], x, y;
    for (int r = 0; r < 5; r++)
      for (int k = 0; k < 5; k++) s[5*r+k] = img[cr-2+r][cc+2-k];
    for (int it = 0; it < 3; it++) begin
      x = activation(s, w, th);
      y = sigma(x, t);
      if (x <= -128 * t) n_lo++; else if (x >= 128 * t) n_hi++; else n_div++;
      for (int j = 0; j < 25; j++) begin
        int sn;
        sn = next_state(y, s[j]);
        if (s[j] != 0) begin if (sn != 0) n_keep++; else n_clear++; end
        s[j] = sn;
      end
    end
    for (int j = 0; j < 25; j++) pat[j] = (s[j] != 0);
  endtask

  always @(posedge clk) begin
    if (res_valid) begin
      logic [24:0] pat;
      n_results++;
      checks++;
      if (exp_r.size() == 0) begin
        failures++; $display("unexpected result");
      end else begin
        int r, c;
        r = exp_r.pop_front(); c = exp_c.pop_front();
        model(r, c, pat);
        if (res_row != 16'(r) || res_col != 16'(c) || res_nz != pat || res_event != pat[12]) begin
          failures++;
          $display("result fail at (%0d,%0d): got (%0d,%0d) nz %h exp %h", r, c, res_row, res_col, res_nz, pat);
        end
        if (pat[12]) n_event++; else n_noevent++;
      end
    end
  end

  task automatic download(input int ww [6], input int tth, input int tt);
    w = ww; th = tth; t = tt;
    for (int k = 0; k < 6; k++) host_params.w[k] = 8'(w[k]);
    host_params.theta = 16'(th);
    host_params.temp  = 12'(t);
    @(negedge clk); host_download = 1;
    @(negedge clk); host_download = 0;
    while (!params_loaded) @(negedge clk);
    n_dl++;
  endtask

  task automatic frame();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < LINE; c++) begin
        int band;
        band = (r / 3 + c / 4) % 3;
        img[r][c] = (band == 0) ? int'($urandom % 30) :
                    (band == 1) ? 80 + int'($urandom % 120) : 235 + int'($urandom % 21);
      end
    for (int r = 2; r < ROWS - 2; r++)
      for (int c = 2; c < LINE - 2; c++) begin
        exp_r.push_back(r); exp_c.push_back(c);
      end
    @(negedge clk); frame_start = 1;
    @(negedge clk); frame_start = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < LINE; c++) begin
        @(negedge clk);
        pix_data = 8'(img[r][c]);
        pix_valid = 1;
        @(posedge clk);
        while (!pix_ready) @(posedge clk);
        @(negedge clk);
        pix_valid = 0;
        if ($urandom % 8 == 0) @(negedge clk);
      end
    while (exp_r.size() != 0 || dut.u_ctrl.voted.cmd.op != CMD_NOP || !pix_ready) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    download('{3, 1, 0, -1, 1, 0}, 1400, 9);
    frame();
    checks++;
    if (err_flag || err_tmr) begin failures++; $display("false error"); end
    checks++;
    if (n_results != FRAMES * (ROWS - 4) * (LINE - 4)) begin failures++; $display("results %0d", n_results); end
    $display("mechanisms: stalls=%0d fifo_fill=%0d skipped=%0d sat_low=%0d sat_high=%0d divided=%0d kept=%0d cleared=%0d events=%0d no_event=%0d downloads=%0d errors=%0d tmr=%0d",
             n_stall, n_fill, n_skip, n_lo, n_hi, n_div, n_keep, n_clear, n_event, n_noevent, n_dl, n_err, n_tmr);
    checks++;
    if (n_stall == 0 || n_fill == 0 || n_skip == 0 || n_lo == 0 || n_hi == 0 || n_div == 0 ||
        n_keep == 0 || n_clear == 0 || n_event == 0 || n_noevent == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
