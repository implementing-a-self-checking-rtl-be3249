// tb_init_interface: INIT with random coded pixels must pass the pixel on
// and load 3*pixel into OUT_Reg with a valid error pair; a parity error on
// either copy, or a difference between the copies, must give a non-code
// error pair in the next cycle; a state update must overwrite OUT_Reg.
module tb_init_interface;
  import pe_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, upd_en = 0;
  pix_t sta_a, sta_b, pass_a, pass_b;
  logic [9:0] upd_s3, s3;
  logic [1:0] err;
  int checks = 0, failures = 0;

  init_interface dut (.*);

  always #5 clk = ~clk;

  function automatic pix_t enc(input int p);
    logic [7:0] d;
    d = 8'(p);
    return {~(^d), d};
  endfunction

  task automatic do_init(input pix_t a, input pix_t b, input bit expect_err, input int p);
    @(negedge clk);
    sta_a = a; sta_b = b; init = 1;
    @(negedge clk);
    init = 0;
    checks++;
    if (tr_bad(err) != expect_err) begin failures++; $display("err fail a=%h b=%h err=%b", a, b, err); end
    if (!expect_err) begin
      checks++;
      if (pass_a != a || pass_b != b || s3 != 10'(3 * p)) begin
        failures++; $display("data fail p=%0d s3=%0d pass=%h", p, s3, pass_a);
      end
    end
  endtask

  initial begin
    sta_a = PIX_ZERO; sta_b = PIX_ZERO; upd_s3 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      int p;
      p = int'($urandom % 256);
      do_init(enc(p), enc(p), 0, p);
      case (i % 4)
        1: do_init(enc(p) ^ 9'h100, enc(p), 1, p);            // parity error copy a
        2: do_init(enc(p), enc(p) ^ 9'h004 ^ 9'h100, 1, p);   // copies differ
        3: begin                                              // state update
          @(negedge clk);
          upd_s3 = 10'(3 * ((i * 7) % 256)); upd_en = 1;
          @(negedge clk);
          upd_en = 0;
          checks++;
          if (s3 != upd_s3 || tr_bad(err)) begin failures++; $display("update fail"); end
        end
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
