// tb_two_rail_checker: all 64 combinations of three two-rail input pairs;
// the output must be a valid pair (01 or 10) exactly when all three inputs
// are valid.
module tb_two_rail_checker;
  logic [2:0][1:0] in_tr;
  logic [1:0]      out_tr;
  int checks = 0, failures = 0;

  two_rail_checker #(.N(3)) dut (.in_tr, .out_tr);

  initial begin
    for (int v = 0; v < 64; v++) begin
      bit all_ok;
      in_tr = 6'(v);
      #1;
      all_ok = 1;
      for (int i = 0; i < 3; i++) if (in_tr[i][1] == in_tr[i][0]) all_ok = 0;
      checks++;
      if ((out_tr[1] != out_tr[0]) != all_ok) begin
        failures++;
        $display("fail in=%b out=%b", in_tr, out_tr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
