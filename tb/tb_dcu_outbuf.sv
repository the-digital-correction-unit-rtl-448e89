// tb_dcu_outbuf: self-checking testbench of the 16-word output buffer.
//
// Fills the FIFO to exactly 16 words, checks `full` and the count, checks
// that a 17th write is dropped and raises the sticky overflow flag, drains it
// in order, then runs random simultaneous writes and reads against a queue
// model, and finally checks that `clear` empties it and clears the flag.
module tb_dcu_outbuf;
  logic clk = 0, rst_n = 0, clear = 0, wr = 0, rd = 0;
  logic [15:0] wr_data, rd_data;
  logic empty, full, overflow;
  logic [4:0] count;
  int checks = 0, failures = 0;
  int model[$];

  dcu_outbuf dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(empty && !full && count == 0 && !overflow, "empty after reset");
    for (int i = 0; i < 16; i++) begin
      wr = 1; wr_data = 16'(1000 + i);
      @(negedge clk);
    end
    wr = 0;
    chk(full && count == 16 && !overflow, "full at 16 words");
    wr = 1; wr_data = 16'hFFFF;
    @(negedge clk);
    wr = 0;
    chk(overflow && count == 16, "17th write dropped, overflow set");
    for (int i = 0; i < 16; i++) begin
      chk(!empty && rd_data == 16'(1000 + i), $sformatf("read %0d", i));
      rd = 1;
      @(negedge clk);
      rd = 0;
    end
    chk(empty && overflow, "drained, overflow sticky");
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      bit w, r;
      w = ($urandom_range(0, 99) < 55);
      r = ($urandom_range(0, 99) < 50);
      wr = w; rd = r; wr_data = 16'($urandom);
      #1;
      if (r && model.size() > 0) chk(rd_data == 16'(model[0]), "random read data");
      chk(count == 5'(model.size()), "random count");
      if (r && model.size() > 0) void'(model.pop_front());
      if (w && (model.size() < 16)) model.push_back(int'(wr_data));
      @(negedge clk);
    end
    wr = 0; rd = 0;
    clear = 1;
    @(negedge clk);
    clear = 0;
    chk(empty && !overflow && count == 0, "clear empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
