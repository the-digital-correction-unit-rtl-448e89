// tb_dcu_wps: self-checking testbench of the WSM personality section.
//
// Generates drift-chamber-like waveforms (low noise, single pulses of random
// height and width, double pulses whose dip falls below the trailing
// threshold, negative excursions) and compares the whole output stream, word
// by word, with the look-ahead reference model, for: history depths 0, 8 and
// 64; trail counts 1 and 6; pass-through; forced recording at 512- and
// 1024-bucket wire boundaries; and a restart with `clear`.
module tb_dcu_wps;
  import dcu_pkg::*;
  import dcu_ref_pkg::*;

  logic  clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  word_t in_word, trig_th, trail_th, out_word;
  logic [6:0] depth;
  logic [7:0] trail_cnt;
  logic  pass = 0, wb_en = 0, wb_1024 = 0;
  logic  out_valid, recording;
  logic [15:0] addr;
  logic  ev_trigger, ev_record_start, ev_record_end, ev_boundary;
  int checks = 0, failures = 0;
  int got[$];
  int n_start = 0, n_end = 0, n_bound = 0;

  dcu_wps dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) got.push_back(int'(out_word));
    if (rst_n && ev_record_start) n_start++;
    if (rst_n && ev_record_end) n_end++;
    if (rst_n && ev_boundary) n_bound++;
  end

  // A waveform of n samples: noise around 20 with pulses.
  function automatic void make_wave(int n, ref int x[$]);
    int t;
    x.delete();
    t = 0;
    while (x.size() < n) begin
      int gap, amp, rise, fall;
      gap = $urandom_range(5, 120);
      for (int i = 0; i < gap; i++) x.push_back($urandom_range(0, 40));
      amp  = $urandom_range(300, 20000);
      rise = $urandom_range(2, 8);
      fall = $urandom_range(4, 30);
      for (int i = 1; i <= rise; i++) x.push_back(amp * i / rise);
      for (int i = fall - 1; i >= 0; i--) x.push_back(amp * i / fall);
      case ($urandom_range(0, 3))
        0: begin  // second pulse after a short dip
          for (int i = 0; i < 3; i++) x.push_back($urandom_range(0, 40));
          for (int i = 1; i <= rise; i++) x.push_back(amp * i / rise);
          for (int i = fall - 1; i >= 0; i--) x.push_back(amp * i / fall);
        end
        1: for (int i = 0; i < 5; i++) x.push_back(-$urandom_range(0, 3000));
        default: ;
      endcase
    end
    while (x.size() > n) void'(x.pop_back());
  endfunction

  task automatic run(string name, int n, wps_cfg_t c);
    int x[$], exp[$];
    @(negedge clk);
    clear = 1;
    trig_th = 16'(c.trig); trail_th = 16'(c.trail); depth = 7'(c.depth);
    trail_cnt = 8'(c.tcnt); pass = c.pass; wb_en = c.wb_en; wb_1024 = c.wb_1024;
    @(negedge clk);
    clear = 0;
    got.delete();
    make_wave(n, x);
    for (int i = 0; i < n; i++) begin
      in_word = 16'(x[i]); in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(3, 6)) @(negedge clk);
    end
    repeat (8) @(negedge clk);
    ref_wps(x, c, exp);
    chk(got.size() == exp.size(), $sformatf("%s: %0d words, expected %0d", name, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      chk(got[i] == exp[i], $sformatf("%s: word %0d is %0d, expected %0d", name, i, got[i], exp[i]));
    chk(got.size() < n || c.pass, $sformatf("%s: stream was compacted", name));
  endtask

  initial begin
    wps_cfg_t c;
    in_word = 0; trig_th = 0; trail_th = 0; depth = 0; trail_cnt = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    c = '{trig: 1000, trail: 100, depth: 8, tcnt: 4, pass: 0, wb_en: 0, wb_1024: 0};
    run("depth 8", 1500, c);
    c.depth = 0;  c.tcnt = 1;  run("depth 0", 1000, c);
    c.depth = 64; c.tcnt = 6;  run("depth 64", 1500, c);
    c.depth = 5;  c.tcnt = 3;  c.pass = 1; run("pass-through", 300, c);
    c.pass = 0; c.wb_en = 1;   run("wire 512", 1500, c);
    c.wb_1024 = 1; c.depth = 12; run("wire 1024", 2500, c);
    c.wb_en = 0; c.trig = 5000; c.trail = 500; c.tcnt = 0; run("tcnt 0", 800, c);
    chk(n_start > 20 && n_end > 20 && n_bound >= 6, "records started, ended and forced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
