// tb_dcu_alu: self-checking testbench of the corrector ALU.
//
// Feeds corner and random operands (multiplicand, C2-C1, C1) back to back,
// one every 16 clocks, and compares each result with y = floor(xs * d / 2^15)
// + c1 limited to +-32767, computed by the reference model. Also checks that
// the result appears exactly 16 clocks after `go`, so one result per 16
// clocks is sustained, and that the uncorrected sample travels with it.
module tb_dcu_alu;
  import dcu_pkg::*;
  import dcu_ref_pkg::*;

  logic  clk = 0, rst_n = 0, go = 0;
  logic [14:0] xs;
  word_t d, c1, y;
  adc_t  raw_in, raw_out;
  logic  busy, y_valid;
  int checks = 0, failures = 0;

  dcu_alu dut (.*);

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

  int exp_y[$], exp_raw[$], go_cyc[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;  // readers at an edge see the count before it

  // result checker
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      int e, r, g;
      e = exp_y.pop_front();
      r = exp_raw.pop_front();
      g = go_cyc.pop_front();
      chk(int'(y) == e, $sformatf("y=%0d expected %0d", y, e));
      chk(int'(raw_out) == r, "raw travels with result");
      chk(cyc - g == 16, $sformatf("latency %0d, expected 16", cyc - g));
    end
  end

  task automatic issue(int x, int dd, int cc);
    @(negedge clk);
    xs = 15'(x); d = 16'(dd); c1 = 16'(cc); raw_in = 15'(x ^ 15'h2AAA);
    go = 1;
    exp_y.push_back(ref_correct(x, 1, cc, cc + dd));
    exp_raw.push_back(x ^ 32'h2AAA);
    go_cyc.push_back(cyc + 1);
    @(negedge clk);
    go = 0;
    repeat (14) @(negedge clk);
  endtask

  initial begin
    xs = 0; d = 0; c1 = 0; raw_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // the back-to-back issue places go exactly 16 clocks apart
    issue(0, 1000, 5);
    issue(32767, 32767, 0);
    issue(32767, -32768, 0);
    issue(16384, 16384, 100);
    issue(1, -1, 0);               // floor(-1/32768) = -1
    issue(32767, 32767, 32767);     // saturates high
    issue(32767, -32768, -32767);   // saturates low
    issue(12345, -12345, 20000);
    for (int i = 0; i < 300; i++)
      issue($urandom_range(0, 32767), $urandom_range(0, 65535) - 32768,
            $urandom_range(0, 65534) - 32767);
    repeat (20) @(negedge clk);
    chk(exp_y.size() == 0, "every operation produced a result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
