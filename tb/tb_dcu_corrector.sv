// tb_dcu_corrector: self-checking testbench of the corrector.
//
// Plays the bus side of a data cycle (sample, then C1, then C2, then the ALU
// start, 16 clocks per sample) and compares every corrected word with the
// reference y = 2^(n-16) * x * (C2 - C1) + C1 for all shifts n = 1..8 and
// random samples and constants. Then exercises the diagnostic modes: with
// constant loading disabled the registers keep their values whatever the bus
// carries (pass-through with C1 = 0, C2 = 0x4000, n = 2 returns 14-bit
// samples unchanged), and with ADC loading disabled the sample is held.
module tb_dcu_corrector;
  import dcu_pkg::*;
  import dcu_ref_pkg::*;

  logic    clk = 0, rst_n = 0;
  word_t   bus_in;
  logic    ld_adc = 0, ld_c1 = 0, ld_c2 = 0, alu_go = 0;
  logic    en_adc = 1, en_const = 1;
  logic [3:0] shift_n = 1;
  logic    out_valid;
  sample_t out_sample;
  adc_t    adc_q;
  word_t   c1_q, c2_q;
  int checks = 0, failures = 0;

  dcu_corrector dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_y[$], exp_raw[$];
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e, r;
      e = exp_y.pop_front();
      r = exp_raw.pop_front();
      chk(int'(out_sample.y) == e, $sformatf("y=%0d expected %0d (n=%0d)", out_sample.y, e, shift_n));
      chk(int'(out_sample.raw) == r, "raw sample");
    end
  end

  // One data cycle; e is the expected result.
  task automatic cycle(int adc, int c1, int c2, int e, int raw);
    @(negedge clk); bus_in = 16'(adc); ld_adc = 1;
    @(negedge clk); ld_adc = 0; bus_in = 16'(c1); ld_c1 = 1;
    @(negedge clk); ld_c1 = 0;  bus_in = 16'(c2); ld_c2 = 1;
    @(negedge clk); ld_c2 = 0;  bus_in = 16'hDEAD; alu_go = 1;
    exp_y.push_back(e);
    exp_raw.push_back(raw);
    @(negedge clk); alu_go = 0;
    repeat (11) @(negedge clk);
  endtask

  initial begin
    bus_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // every shift, random data and constants spanning a segment
    for (int n = 1; n <= 8; n++) begin
      shift_n = 4'(n);
      for (int i = 0; i < 40; i++) begin
        int a, c1, c2;
        a  = $urandom_range(0, 32767);
        c1 = $urandom_range(0, 40000) - 20000;
        c2 = c1 + $urandom_range(0, 24000) - 12000;
        cycle(a, c1, c2, ref_correct(a, n, c1, c2), a);
      end
    end
    // out-of-range shift values are clamped to 1..8
    shift_n = 0;  cycle(12345, 100, 9000, ref_correct(12345, 1, 100, 9000), 12345);
    shift_n = 12; cycle(12345, 100, 9000, ref_correct(12345, 8, 100, 9000), 12345);
    // pass-through: load C1 = 0, C2 = 0x4000 once, then freeze them
    shift_n = 2;
    cycle(100, 0, 16'h4000, 100, 100);
    repeat (20) @(negedge clk);
    en_const = 0;
    for (int i = 0; i < 30; i++) begin
      int a;
      a = $urandom_range(0, 16383);
      cycle(a, $urandom_range(0, 30000), $urandom_range(0, 30000), a, a);
    end
    repeat (20) @(negedge clk);
    chk(c1_q == 0 && c2_q == 16'h4000, "constants frozen");
    // ADC load disabled: the last sample is held
    cycle(8191, 0, 0, 8191, 8191);
    en_adc = 0;
    cycle(999, 0, 0, 8191, 8191);
    en_adc = 1;
    repeat (20) @(negedge clk);
    chk(adc_q == 15'd8191, "ADC register readback");
    chk(exp_y.size() == 0, "every data cycle produced a result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
