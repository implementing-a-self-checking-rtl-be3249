// tb_residue_checker: random and boundary values through mod-3 and mod-9
// checkers (signed reading); the two-rail output must be complementary
// exactly when the value is a multiple of A or the check is disabled.
module tb_residue_checker;
  logic [15:0] v3, v9;
  logic        en3, en9;
  logic [1:0]  tr3, tr9;
  int checks = 0, failures = 0;

  residue_checker #(.W(16), .A(3)) dut3 (.value(v3), .en(en3), .tr(tr3));
  residue_checker #(.W(16), .A(9)) dut9 (.value(v9), .en(en9), .tr(tr9));

  task automatic check(input int iv);
    int s;
    v3 = 16'(iv); v9 = 16'(iv); en3 = 1'b1; en9 = 1'b1;
    #1;
    s = int'($signed(v3));
    checks++;
    if ((tr3[1] != tr3[0]) != (s % 3 == 0)) begin failures++; $display("mod3 fail %0d tr=%b", s, tr3); end
    checks++;
    if ((tr9[1] != tr9[0]) != (s % 9 == 0)) begin failures++; $display("mod9 fail %0d tr=%b", s, tr9); end
    en3 = 1'b0; en9 = 1'b0; #1;
    checks++;
    if (tr3[1] == tr3[0] || tr9[1] == tr9[0]) begin failures++; $display("disabled fail %0d", s); end
  endtask

  initial begin
    check(0); check(3); check(-3); check(9); check(-9); check(1); check(-1);
    check(32766); check(-32768); check(765);
    for (int i = 0; i < 2000; i++) check(int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
