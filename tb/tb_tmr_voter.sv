// tb_tmr_voter: random words with zero or one corrupted copy; the voter must
// return the true word and flag the corruption.
module tb_tmr_voter;
  logic [15:0] a, b, c, y;
  logic        mism;
  int checks = 0, failures = 0;

  tmr_voter #(.W(16)) dut (.a, .b, .c, .y, .mismatch(mism));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic [15:0] w, f;
      int which;
      w = 16'($urandom);
      f = 16'($urandom) | 16'h1;
      which = i % 4;
      a = (which == 1) ? w ^ f : w;
      b = (which == 2) ? w ^ f : w;
      c = (which == 3) ? w ^ f : w;
      #1;
      checks++;
      if (y != w || mism != (which != 0)) begin
        failures++;
        $display("fail w=%h a=%h b=%h c=%h y=%h m=%b", w, a, b, c, y, mism);
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
