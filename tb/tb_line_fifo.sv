// tb_line_fifo: random push/pop traffic against a queue model, including
// simultaneous push and pop on a full buffer (row-delay use) and flush.
module tb_line_fifo;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0;
  logic [8:0] din, dout;
  logic full, empty;
  logic [8:0] q [$];
  int checks = 0, failures = 0, both_full = 0;

  line_fifo #(.DEPTH(D), .WIDTH(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (full != (q.size() == D) || empty != (q.size() == 0)) begin
        failures++; $display("flags fail size=%0d full=%b empty=%b", q.size(), full, empty);
      end
      if (q.size() > 0) begin
        checks++;
        if (dout != q[0]) begin failures++; $display("data fail %h vs %h", dout, q[0]); end
      end
      din   = 9'($urandom);
      push  = ($urandom % 3 != 0) && (q.size() < D || ($urandom % 2 == 0));
      pop   = (q.size() > 0) && ($urandom % 3 == 0 || (push && q.size() == D));
      flush = (i % 997 == 996);
      if (push && pop && q.size() == D) both_full++;
      @(posedge clk);
      #1;
      if (flush) q.delete();
      else begin
        if (pop)  void'(q.pop_front());
        if (push) q.push_back(din);
      end
      push = 0; pop = 0; flush = 0;
    end
    checks++;
    if (both_full == 0) begin failures++; $display("push+pop on full never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
