// tb_dcu_wsm_history: self-checking testbench of the WSM history FIFO.
//
// For depths 0, 1, a few random ones and the maximum of 64, writes a random
// word stream (one word every few clocks) and checks in the clock of each
// write that the delayed output is the word written `depth` writes earlier,
// and that it is flagged valid only once that many words exist since `clear`.
module tb_dcu_wsm_history;
  import dcu_pkg::*;

  logic  clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  word_t in_word, del_word;
  logic [6:0] depth;
  logic  del_valid;
  int checks = 0, failures = 0;

  dcu_wsm_history dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int d, int n);
    int hist[$];
    @(negedge clk); clear = 1; depth = 7'(d);
    @(negedge clk); clear = 0;
    for (int t = 0; t < n; t++) begin
      in_word  = 16'($urandom);
      in_valid = 1;
      hist.push_back(int'(in_word));
      #1;
      chk(del_valid == (t >= d), $sformatf("valid d=%0d t=%0d", d, t));
      if (t >= d)
        chk(int'(del_word) == hist[t - d], $sformatf("word d=%0d t=%0d", d, t));
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  initial begin
    in_word = 0; depth = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 50);
    run(1, 50);
    run(64, 300);
    run(63, 200);
    for (int i = 0; i < 5; i++) run($urandom_range(2, 62), 150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
