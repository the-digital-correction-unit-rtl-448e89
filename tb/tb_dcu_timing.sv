// tb_dcu_timing: self-checking testbench of the data-cycle sequencer.
//
// Starts single data cycles and back-to-back ones, and checks clock by clock
// that the input buffer enable, the two constant memory reads, the load
// strobes and the ALU start come in phases 0, 1, 2 and 3 after the start is
// taken, that `ready` is low for the rest of the 16-clock cycle, and that
// starts every 16 clocks give one data cycle per 16 clocks (the 1.33 MHz
// sample rate at a 21.3 MHz clock).
module tb_dcu_timing;
  logic clk = 0, rst_n = 0, start = 0;
  logic ready, busy, adc_oe, cmem_oe, cmem_sel, ld_adc, ld_c1, ld_c2, alu_go, bus_free;
  int checks = 0, failures = 0;

  dcu_timing dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // expected outputs for a given phase (-1 = idle)
  task automatic chk_phase(int p);
    chk(adc_oe   == (p == 0),           $sformatf("adc_oe p%0d", p));
    chk(ld_adc   == (p == 0),           $sformatf("ld_adc p%0d", p));
    chk(cmem_oe  == (p == 1 || p == 2), $sformatf("cmem_oe p%0d", p));
    chk(cmem_sel == (p == 2),           $sformatf("cmem_sel p%0d", p));
    chk(ld_c1    == (p == 1),           $sformatf("ld_c1 p%0d", p));
    chk(ld_c2    == (p == 2),           $sformatf("ld_c2 p%0d", p));
    chk(alu_go   == (p == 3),           $sformatf("alu_go p%0d", p));
    chk(bus_free == !(p >= 0 && p <= 2), $sformatf("bus_free p%0d", p));
    chk(ready    == (p < 0 || p == 15), $sformatf("ready p%0d", p));
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int go_times[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk_phase(-1);
    // single cycle
    start = 1;
    @(negedge clk);
    start = 0;
    for (int p = 0; p < 16; p++) begin
      chk_phase(p);
      @(negedge clk);
    end
    chk_phase(-1);
    repeat (5) @(negedge clk);
    chk_phase(-1);
    // start held high: back-to-back cycles, every 16 clocks
    start = 1;
    for (int c = 0; c < 16 * 6; c++) begin
      @(negedge clk);
      chk_phase(c % 16);
      if (alu_go) go_times.push_back(c);
    end
    start = 0;
    chk(go_times.size() == 6, "six data cycles in 96 clocks");
    for (int i = 1; i < go_times.size(); i++)
      chk(go_times[i] - go_times[i-1] == 16, "16 clocks per data cycle");
    // a start while busy is ignored
    @(negedge clk);
    chk_phase(-1);
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (3) @(negedge clk);
    start = 1;                       // phase 3, not ready
    @(negedge clk);
    start = 0;
    chk_phase(4);
    for (int p = 5; p < 16; p++) @(negedge clk);
    @(negedge clk);
    chk_phase(-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
