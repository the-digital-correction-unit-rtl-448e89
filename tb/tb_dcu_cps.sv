// tb_dcu_cps: self-checking testbench of the CDM personality section.
//
// Sends calorimeter groups (base0, data0, base1, data1) with random corrected
// and uncorrected values, some of them placed right at the threshold, for
// both decision senses with and without baseline subtraction, and checks the
// single output word of each group against the reference model (selected
// signal, selection bit, clamping). Then checks override mode with several
// masks (every masked element out in order, unchanged) and that `clear`
// restarts the group at base0.
module tb_dcu_cps;
  import dcu_pkg::*;
  import dcu_ref_pkg::*;

  logic    clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  sample_t in_sample;
  adc_t    thr;
  logic    sense = 0, bsub = 0, override_en = 0;
  logic [3:0] mask = 0;
  logic    out_valid;
  word_t   out_word;
  logic    ev_sel0, ev_sel1, ev_override;
  int checks = 0, failures = 0;
  int got[$];
  int n_sel0 = 0, n_sel1 = 0;

  dcu_cps dut (.*);

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

  always @(posedge clk) begin
    if (rst_n && out_valid) got.push_back(int'(out_word) & 32'hFFFF);
    if (rst_n && ev_sel0) n_sel0++;
    if (rst_n && ev_sel1) n_sel1++;
  end

  task automatic send(int y, int raw);
    @(negedge clk);
    in_sample.y = 16'(y); in_sample.raw = 15'(raw); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    thr = 15'd16000;
    in_sample = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      sense = m[0]; bsub = m[1];
      for (int g = 0; g < 60; g++) begin
        int b0, d0, b1, d1, raw;
        b0  = $urandom_range(0, 3000) - 500;
        b1  = $urandom_range(0, 3000) - 500;
        d0  = $urandom_range(0, 32767);
        d1  = $urandom_range(0, 65534) - 32767;
        raw = (g % 10 == 0) ? 16000 : (g % 10 == 1) ? 15999 : (g % 10 == 2) ? 16001
            : $urandom_range(0, 32767);
        got.delete();
        send(b0, 0); send(d0, raw); send(b1, 0); send(d1, 0);
        repeat (2) @(negedge clk);
        chk(got.size() == 1, "one word per group");
        if (got.size() == 1)
          chk(got[0] == ref_cps(b0, d0, b1, d1, raw, 16000, sense, bsub),
              $sformatf("group word %h, expected %h (sense %0d bsub %0d raw %0d)", got[0],
                        ref_cps(b0, d0, b1, d1, raw, 16000, sense, bsub), sense, bsub, raw));
      end
    end
    chk(n_sel0 > 20 && n_sel1 > 20, "both signals selected");
    // override: masked elements leave unchanged, in order
    override_en = 1;
    for (int m = 0; m < 16; m += 5) begin
      int v[4];
      mask = 4'(m);
      got.delete();
      for (int i = 0; i < 4; i++) begin
        v[i] = $urandom_range(0, 65535) - 32768;
        send(v[i], $urandom_range(0, 32767));
      end
      repeat (2) @(negedge clk);
      chk(got.size() == $countones(m), $sformatf("override mask %0d count", m));
      for (int i = 0, k = 0; i < 4; i++)
        if (m[i]) begin
          if (k < got.size()) chk(got[k] == (v[i] & 32'hFFFF), $sformatf("override mask %0d element %0d", m, i));
          k++;
        end
    end
    // clear in mid-group restarts at base0
    override_en = 0; sense = 1; bsub = 1;
    send(111, 0); send(222, 20000);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    got.delete();
    send(100, 0); send(5000, 20000); send(50, 0); send(7000, 0);
    repeat (2) @(negedge clk);
    chk(got.size() == 1 && got[0] == 4900, "clear restarts the group");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
