// tb_dcu_top: end-to-end testbench of the whole DCU at its default sizes.
//
// The testbench plays the chip's surroundings: an input data buffer holding
// the digitised samples, an external constant memory whose C1/C2 pair for a
// segment is f(start of segment) and f(end of segment) with
// f(v) = 3v/4 + v^2/2^17 - 200, a host that programs the registers between
// runs, and a reader that empties the output bus. Samples are started back
// to back, one every 16 clocks. Every output word is compared with the
// reference models applied to the corrected stream. The runs are:
//   1. WSM compaction of pulses (history depth 8) with shift n = 4,
//      including double pulses;
//   2. WSM with 512-bucket wire boundaries and the maximum depth of 64;
//   3. CDM gain selection with baseline subtraction, sense "above", n = 6;
//   4. CDM override mode, base0 and data1 only;
//   5. corrector pass-through (constants loaded once and frozen) seen through
//      WSM pass-through mode;
//   6. output overflow: the reader pauses while WSM pass-through fills the
//      16-word buffer, and the status register reports it;
//   7. WSM with 128 correction segments (n = 8), 1024-bucket wire boundaries
//      and depth 64;
//   8. CDM gain selection with sense "below" and no baseline subtraction.
// Each mechanism must occur at least once or a failure is counted.
module tb_dcu_top;
  import dcu_pkg::*;
  import dcu_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [15:0] bus_in, bus_out;
  logic        bus_oe;
  logic        start = 0, ready, adc_oe, cmem_oe, cmem_sel, bus_free;
  logic        reg_cs = 0, reg_wr = 0;
  logic [3:0]  reg_addr = 0;
  logic [15:0] out_data;
  logic        out_empty, out_rd = 0, out_overflow;
  logic [6:0]  events;

  int checks = 0, failures = 0;

  dcu_top dut (.*);

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

  // ---------------------------------------------------------------- world
  int  cur_n = 1;          // shift n programmed in the DCU
  int  cur_adc = 0;        // sample held by the input data buffer
  int  host_data = 0;
  bit  freeze_mem = 0;     // constant memory returns garbage (pass-through run)
  int  samples[$];
  int  adc_oe_cyc[$];
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int f_curve(int v);
    return (3 * v) / 4 + int'((longint'(v) * v) >> 17) - 200;
  endfunction
  function automatic int c1_of(int adc, int n);
    int seg, len;
    len = 1 << (16 - n);
    seg = adc / len;
    return f_curve(seg * len);
  endfunction
  function automatic int c2_of(int adc, int n);
    int seg, len;
    len = 1 << (16 - n);
    seg = adc / len;
    return f_curve((seg + 1) * len);
  endfunction

  always_comb begin
    if (adc_oe)       bus_in = 16'(cur_adc);
    else if (cmem_oe) bus_in = freeze_mem ? 16'h5A5A
                             : 16'(cmem_sel ? c2_of(cur_adc, cur_n) : c1_of(cur_adc, cur_n));
    else              bus_in = 16'(host_data);
  end

  // the input buffer presents the next sample when a data cycle is taken
  always @(posedge clk) begin
    if (start && ready) begin
      cur_adc <= samples.pop_front();
      adc_oe_cyc.push_back(cyc);
    end
  end

  // reader on the output bus
  bit reader_en = 1;
  int got[$];
  always @(negedge clk) out_rd = reader_en && !out_empty;
  always @(posedge clk) if (rst_n && out_rd && !out_empty) got.push_back(int'(signed'(out_data)));

  // mechanism counters
  int n_trig = 0, n_rec_start = 0, n_rec_end = 0, n_bound = 0;
  int n_sel0 = 0, n_sel1 = 0, n_ovr = 0, n_double = 0, n_overflow = 0;
  int n_pass_wsm = 0, n_pass_corr = 0, n_mode_switch = 0, n_bsub = 0;
  always @(posedge clk) if (rst_n) begin
    n_trig      += events[0];
    n_rec_start += events[1];
    n_rec_end   += events[2];
    n_bound     += events[3];
    n_sel0      += events[4];
    n_sel1      += events[5];
    n_ovr       += events[6];
  end

  // ------------------------------------------------------------- host side
  task automatic wreg(reg_addr_e a, int v);
    @(negedge clk);
    while (!bus_free) @(negedge clk);
    reg_cs = 1; reg_wr = 1; reg_addr = 4'(a); host_data = v;
    @(negedge clk);
    reg_cs = 0; reg_wr = 0;
  endtask

  task automatic rreg(reg_addr_e a, output int v);
    @(negedge clk);
    while (!bus_free) @(negedge clk);
    reg_cs = 1; reg_wr = 0; reg_addr = 4'(a);
    #1 chk(bus_oe, "DCU drives the bus on a read");
    v = int'(bus_out);
    @(negedge clk);
    reg_cs = 0;
  endtask

  function automatic int ctrl_word(bit cdm, int n, bit ld_const, bit wsm_pass, bit wb_en,
                                   bit wb_1024, bit sense, bit bsub, bit ovr);
    ctrl_t c;
    c = '{cdm_override: ovr, cdm_bsub: bsub, cdm_sense: sense, wb_1024: wb_1024,
          wb_en: wb_en, wsm_pass: wsm_pass, shift_n: 4'(n), ld_const: ld_const,
          ld_adc: 1'b1, pers_cdm: cdm};
    return int'(c);
  endfunction

  // Run samples x back to back and return the corrected values.
  task automatic run_samples(input int x[$], output int y[$]);
    int t0;
    y.delete();
    foreach (x[i]) begin
      samples.push_back(x[i]);
      y.push_back(ref_correct(x[i], cur_n, c1_of(x[i], cur_n), c2_of(x[i], cur_n)));
    end
    adc_oe_cyc.delete();
    @(negedge clk);
    start = 1;
    while (samples.size() > 0) @(negedge clk);
    start = 0;
    repeat (60) @(negedge clk);
    // one sample per 16 clocks
    chk(adc_oe_cyc.size() == x.size(), "every sample taken");
    if (adc_oe_cyc.size() > 1)
      chk(adc_oe_cyc[$] - adc_oe_cyc[0] == 16 * (adc_oe_cyc.size() - 1),
          $sformatf("sample rate: %0d clocks for %0d samples",
                    adc_oe_cyc[$] - adc_oe_cyc[0], adc_oe_cyc.size() - 1));
  endtask

  task automatic clear_all();
    wreg(REG_COMMAND, 1);
    repeat (2) @(negedge clk);
    got.delete();
  endtask

  task automatic compare(string name, int exp[$]);
    chk(got.size() == exp.size(), $sformatf("%s: %0d words, expected %0d", name, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      chk(got[i] == exp[i], $sformatf("%s: word %0d is %0d, expected %0d", name, i, got[i], exp[i]));
  endtask

  // raw waveform: baseline near 300 with pulses, some double
  function automatic void make_wave(int n, ref int x[$]);
    x.delete();
    while (x.size() < n) begin
      int amp, rise, fall, reps;
      repeat ($urandom_range(10, 90)) x.push_back($urandom_range(250, 350));
      amp  = $urandom_range(3000, 30000);
      rise = $urandom_range(2, 6);
      fall = $urandom_range(5, 20);
      reps = ($urandom_range(0, 2) == 0) ? 2 : 1;
      for (int r = 0; r < reps; r++) begin
        for (int i = 1; i <= rise; i++) x.push_back(300 + (amp - 300) * i / rise);
        for (int i = fall - 1; i >= 0; i--) x.push_back(300 + (amp - 300) * i / fall);
        if (reps == 2 && r == 0) repeat (2) x.push_back(300);
      end
    end
    while (x.size() > n) void'(x.pop_back());
  endfunction

  // records of a WSM stream in which the data fell below the trailing
  // threshold and rose above the trigger again: whole double pulses
  function automatic int count_double(int s[$], int trig, int trail);
    int cnt, i;
    bit dipped, rose;
    cnt = 0; i = 0;
    while (i < s.size()) begin
      if (s[i] == TAG) begin
        dipped = 0; rose = 0;
        i += 2;
        while (i < s.size() && s[i] != TAG) begin
          if (rose && s[i] < trail) dipped = 1;
          if (s[i] > trig) begin
            if (dipped) begin cnt++; dipped = 0; end
            rose = 1;
          end
          i++;
        end
      end else i++;
    end
    return cnt;
  endfunction

  // ------------------------------------------------------------- the runs
  initial begin
    int x[$], y[$], exp[$], v;
    wps_cfg_t c;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // 1. WSM, depth 8, n = 4
    cur_n = 4;
    c = '{trig: 2500, trail: 400, depth: 8, tcnt: 3, pass: 0, wb_en: 0, wb_1024: 0};
    wreg(REG_CTRL, ctrl_word(0, 4, 1, 0, 0, 0, 0, 0, 0));
    wreg(REG_WSM_TRIG, c.trig);  wreg(REG_WSM_TRAIL, c.trail);
    wreg(REG_WSM_DEPTH, c.depth); wreg(REG_WSM_TCNT, c.tcnt);
    clear_all();
    make_wave(600, x);
    run_samples(x, y);
    exp.delete();
    ref_wps(y, c, exp);
    compare("WSM depth 8", exp);
    n_double += count_double(got, c.trig, c.trail);
    chk(got.size() < x.size(), "WSM compacts");
    rreg(REG_ADDR, v);
    chk(v == 600, "bucket address counts samples");

    // 2. WSM, wire boundaries every 512, depth 64
    c = '{trig: 2500, trail: 400, depth: 64, tcnt: 5, pass: 0, wb_en: 1, wb_1024: 0};
    wreg(REG_CTRL, ctrl_word(0, 4, 1, 0, 1, 0, 0, 0, 0));
    wreg(REG_WSM_DEPTH, c.depth); wreg(REG_WSM_TCNT, c.tcnt);
    clear_all();
    make_wave(1200, x);
    run_samples(x, y);
    exp.delete();
    ref_wps(y, c, exp);
    compare("WSM wire 512 depth 64", exp);
    n_double += count_double(got, c.trig, c.trail);

    // 3. CDM, sense "above", baseline subtraction, n = 6
    n_mode_switch++;
    cur_n = 6;
    wreg(REG_CTRL, ctrl_word(1, 6, 1, 0, 0, 0, 1, 1, 0));
    wreg(REG_CDM_THR, 12000);
    clear_all();
    x.delete();
    for (int g = 0; g < 80; g++) begin
      x.push_back($urandom_range(400, 900));
      x.push_back($urandom_range(0, 32767));
      x.push_back($urandom_range(400, 900));
      x.push_back($urandom_range(0, 32767));
    end
    run_samples(x, y);
    exp.delete();
    for (int g = 0; g < 80; g++)
      exp.push_back(int'(signed'(16'(ref_cps(y[4*g], y[4*g+1], y[4*g+2], y[4*g+3],
                                              x[4*g+1], 12000, 1, 1)))));
    compare("CDM select", exp);
    n_bsub++;

    // 4. CDM override, base0 and data1
    wreg(REG_CTRL, ctrl_word(1, 6, 1, 0, 0, 0, 1, 1, 1));
    wreg(REG_CDM_MASK, 4'b1001);
    clear_all();
    x = x[0:39];
    run_samples(x, y);
    exp.delete();
    foreach (y[i]) if (i % 4 == 0 || i % 4 == 3) exp.push_back(y[i]);
    compare("CDM override", exp);

    // 5. corrector pass-through: load C1 = 0, C2 = 0x4000 via the constant
    //    memory once (n = 2), then freeze; WSM pass-through shows every word
    n_mode_switch++;
    cur_n = 2;
    wreg(REG_CTRL, ctrl_word(0, 2, 1, 1, 0, 0, 0, 0, 0));
    wreg(REG_WSM_DEPTH, 0);
    x = '{16384 - 16384};       // segment 0 of n = 2 gives f(0) and f(16384)
    run_samples(x, y);
    wreg(REG_CTRL, ctrl_word(0, 2, 0, 1, 0, 0, 0, 0, 0));
    rreg(REG_C1, v);
    chk(v == (f_curve(0) & 16'hFFFF), "C1 loaded");
    clear_all();
    freeze_mem = 1;
    x.delete();
    for (int i = 0; i < 12; i++) x.push_back($urandom_range(0, 32767));
    run_samples(x, y);
    exp = '{TAG, 0};
    foreach (x[i]) begin
      exp.push_back(ref_correct(x[i], 2, f_curve(0), f_curve(16384)));
      n_pass_corr++;
    end
    compare("frozen constants", exp);
    n_pass_wsm += got.size() == 14;
    freeze_mem = 0;

    // 6. overflow: reader paused, WSM pass-through fills the buffer
    wreg(REG_CTRL, ctrl_word(0, 2, 1, 1, 0, 0, 0, 0, 0));
    clear_all();
    reader_en = 0;
    x.delete();
    for (int i = 0; i < 30; i++) x.push_back(i * 100);
    run_samples(x, y);
    rreg(REG_STATUS, v);
    chk(v[5] && v[4:0] == 16, $sformatf("status shows overflow and 16 words: %h", v));
    n_overflow += out_overflow;
    reader_en = 1;
    repeat (40) @(negedge clk);
    exp = '{TAG, 0};
    for (int i = 0; i < 14; i++) exp.push_back(y[i]);
    compare("overflow keeps the first 16 words", exp);
    clear_all();
    chk(!out_overflow, "clear resets overflow");

    // 7. 128 segments (n = 8), 1024-bucket wire boundaries, depth 64
    n_mode_switch++;
    cur_n = 8;
    c = '{trig: 3000, trail: 300, depth: 64, tcnt: 10, pass: 0, wb_en: 1, wb_1024: 1};
    wreg(REG_CTRL, ctrl_word(0, 8, 1, 0, 1, 1, 0, 0, 0));
    wreg(REG_WSM_TRIG, c.trig);  wreg(REG_WSM_TRAIL, c.trail);
    wreg(REG_WSM_DEPTH, c.depth); wreg(REG_WSM_TCNT, c.tcnt);
    clear_all();
    make_wave(2200, x);
    run_samples(x, y);
    exp.delete();
    ref_wps(y, c, exp);
    compare("WSM n 8 wire 1024", exp);
    n_double += count_double(got, c.trig, c.trail);

    // 8. CDM, sense "below", no baseline subtraction, n = 3
    n_mode_switch++;
    cur_n = 3;
    wreg(REG_CTRL, ctrl_word(1, 3, 1, 0, 0, 0, 0, 0, 0));
    wreg(REG_CDM_THR, 20000);
    clear_all();
    x.delete();
    for (int g = 0; g < 60; g++) begin
      x.push_back($urandom_range(200, 600));
      x.push_back($urandom_range(0, 32767));
      x.push_back($urandom_range(200, 600));
      x.push_back($urandom_range(0, 32767));
    end
    run_samples(x, y);
    exp.delete();
    for (int g = 0; g < 60; g++)
      exp.push_back(int'(signed'(16'(ref_cps(y[4*g], y[4*g+1], y[4*g+2], y[4*g+3],
                                              x[4*g+1], 20000, 0, 0)))));
    compare("CDM sense below", exp);

    // every mechanism happened
    chk(n_trig > 0,        $sformatf("WSM triggers: %0d", n_trig));
    chk(n_rec_start > 0,   $sformatf("WSM records started: %0d", n_rec_start));
    chk(n_rec_end > 0,     $sformatf("WSM records ended by trail count: %0d", n_rec_end));
    chk(n_double > 0,      $sformatf("WSM double pulses recorded whole: %0d", n_double));
    chk(n_bound > 0,       $sformatf("WSM wire boundaries: %0d", n_bound));
    chk(n_pass_wsm > 0,    $sformatf("WSM pass-through runs: %0d", n_pass_wsm));
    chk(n_sel0 > 0,        $sformatf("CDM data0 selected: %0d", n_sel0));
    chk(n_sel1 > 0,        $sformatf("CDM data1 selected: %0d", n_sel1));
    chk(n_bsub > 0,        $sformatf("CDM baseline subtraction runs: %0d", n_bsub));
    chk(n_ovr > 0,         $sformatf("CDM override words: %0d", n_ovr));
    chk(n_pass_corr > 0,   $sformatf("corrector frozen-constant samples: %0d", n_pass_corr));
    chk(n_overflow > 0,    $sformatf("output overflows: %0d", n_overflow));
    chk(n_mode_switch > 0, $sformatf("personality switches: %0d", n_mode_switch));
    $display("mechanisms: trig %0d rec %0d end %0d double %0d bound %0d sel0 %0d sel1 %0d ovr %0d",
             n_trig, n_rec_start, n_rec_end, n_double, n_bound, n_sel0, n_sel1, n_ovr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
