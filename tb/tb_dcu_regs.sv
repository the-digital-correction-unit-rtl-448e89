// tb_dcu_regs: self-checking testbench of the DCU register file.
//
// Checks the reset values, writes and reads back every programmable register
// (including the clamp of the WSM depth to 64 and the field layout of the
// control register), checks that the read-only registers show their inputs
// and ignore writes, that REG_COMMAND bit 0 gives a single-clock `clear`,
// and that the bus is driven only on reads.
module tb_dcu_regs;
  import dcu_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       cs = 0, wr = 0;
  reg_addr_e  addr;
  word_t      wdata, rdata;
  logic       rd_oe, clear;
  logic       bus_free = 1;
  cfg_t       cfg;
  logic [4:0] out_count = 5'd9;
  logic       out_empty = 0, overflow = 1, busy = 1;
  adc_t       adc_q = 15'h1234;
  word_t      c1_q = 16'hBEEF, c2_q = 16'h0123;
  logic [15:0] bucket_addr = 16'h0456;
  int checks = 0, failures = 0;

  dcu_regs dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wreg(reg_addr_e a, int v);
    @(negedge clk); cs = 1; wr = 1; addr = a; wdata = 16'(v);
    @(negedge clk); cs = 0; wr = 0;
  endtask

  task automatic rreg(reg_addr_e a, int e, string what);
    @(negedge clk); cs = 1; wr = 0; addr = a;
    #1 chk(rd_oe, "rd_oe on read");
    chk(rdata == 16'(e), $sformatf("%s read %h expected %h", what, rdata, 16'(e)));
    @(negedge clk); cs = 0;
    #1 chk(!rd_oe, "rd_oe off");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int clear_pulses = 0;
  always @(posedge clk) if (rst_n && clear) clear_pulses++;

  initial begin
    addr = REG_CTRL; wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reset values: loads enabled, n = 1, WSM personality
    rreg(REG_CTRL, 16'h000E, "ctrl reset");
    chk(cfg.ctrl.ld_adc && cfg.ctrl.ld_const && cfg.ctrl.shift_n == 1 && !cfg.ctrl.pers_cdm,
        "ctrl reset fields");
    // control fields
    wreg(REG_CTRL, 16'h1FFF & ~16'h0004);
    chk(cfg.ctrl.cdm_override && cfg.ctrl.cdm_bsub && cfg.ctrl.cdm_sense && cfg.ctrl.wb_1024 &&
        cfg.ctrl.wb_en && cfg.ctrl.wsm_pass && cfg.ctrl.shift_n == 4'hF && !cfg.ctrl.ld_const &&
        cfg.ctrl.ld_adc && cfg.ctrl.pers_cdm, "ctrl fields");
    rreg(REG_CTRL, 16'h1FFB, "ctrl");
    wreg(REG_CTRL, 16'h0038);
    chk(cfg.ctrl.shift_n == 4'd7 && !cfg.ctrl.ld_adc && !cfg.ctrl.pers_cdm, "shift field");
    wreg(REG_WSM_TRIG, -500);   rreg(REG_WSM_TRIG, -500, "trig");
    chk(cfg.wsm_trig == -16'sd500, "trig cfg");
    wreg(REG_WSM_TRAIL, 321);   rreg(REG_WSM_TRAIL, 321, "trail");
    chk(cfg.wsm_trail == 16'sd321, "trail cfg");
    wreg(REG_WSM_DEPTH, 37);    rreg(REG_WSM_DEPTH, 37, "depth");
    wreg(REG_WSM_DEPTH, 100);   rreg(REG_WSM_DEPTH, 64, "depth clamp");
    chk(cfg.wsm_depth == 7'd64, "depth cfg");
    wreg(REG_WSM_TCNT, 9);      rreg(REG_WSM_TCNT, 9, "tcnt");
    chk(cfg.wsm_tcnt == 8'd9, "tcnt cfg");
    wreg(REG_CDM_THR, 16'h7ABC); rreg(REG_CDM_THR, 16'h7ABC, "cdm thr");
    chk(cfg.cdm_thr == 15'h7ABC, "cdm thr cfg");
    wreg(REG_CDM_MASK, 5);      rreg(REG_CDM_MASK, 5, "mask");
    chk(cfg.cdm_mask == 4'd5, "mask cfg");
    // read-only registers
    rreg(REG_STATUS, {9'b0, 1'b0, 1'b1, 1'b1, 5'd9}, "status");
    out_empty = 1; overflow = 0; busy = 0; out_count = 0;
    rreg(REG_STATUS, 16'h0080, "status empty");
    rreg(REG_ADC, 16'h1234, "adc");
    rreg(REG_C1, 16'hBEEF, "c1");
    rreg(REG_C2, 16'h0123, "c2");
    rreg(REG_ADDR, 16'h0456, "addr");
    wreg(REG_ADC, 0);           rreg(REG_ADC, 16'h1234, "adc ignores writes");
    // command
    chk(clear_pulses == 0, "no clear yet");
    wreg(REG_COMMAND, 1);
    repeat (3) @(negedge clk);
    chk(clear_pulses == 1, "one clear pulse");
    wreg(REG_COMMAND, 0);
    repeat (3) @(negedge clk);
    chk(clear_pulses == 1, "bit 0 clear gives no pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
