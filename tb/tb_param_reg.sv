// tb_param_reg: shifts random coded parameter sets in serially (MSB first)
// and compares every field; a set with one field not a multiple of its code
// generator must raise a non-code error pair once shifting stops.
module tb_param_reg;
  import pe_pkg::*;
  logic clk = 0, rst_n = 0, shift = 0, sdi = 0;
  coded_params_t prm;
  logic [1:0] err;
  int checks = 0, failures = 0;

  param_reg dut (.*);

  always #5 clk = ~clk;

  task automatic load(input logic [PRM_BITS-1:0] v);
    for (int b = PRM_BITS - 1; b >= 0; b--) begin
      @(negedge clk);
      shift = 1; sdi = v[b];
    end
    @(negedge clk);
    shift = 0;
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      coded_params_t c;
      int w [6], th, t;
      for (int k = 0; k < 6; k++) begin
        w[k] = int'($urandom % 256) - 128;
        c.w3[k] = 10'(3 * w[k]);
      end
      th = int'($urandom % 65536) - 32768;
      t  = int'($urandom % 4096);
      c.th9 = 20'(9 * th);
      c.t9  = 16'(9 * t);
      if (i % 2 == 1) begin
        case ((i / 2) % 3)
          0: c.w3[i % 6] = c.w3[i % 6] ^ 10'h001;
          1: c.th9 = c.th9 + 20'd3;
          default: c.t9 = c.t9 + 16'd1;
        endcase
      end
      load(c);
      checks++;
      if (prm != c) begin failures++; $display("data fail %h vs %h", prm, c); end
      checks++;
      if (tr_bad(err) != (i % 2 == 1)) begin failures++; $display("err fail i=%0d err=%b", i, err); end
    end
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
