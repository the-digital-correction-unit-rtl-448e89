// dcu_top: the Digital Correction Unit, a data correction and compaction chip.
//
// Samples from a detector's analog memories arrive, digitised, on the input
// bus. The corrector applies each sample's piece-wise linear correction
// (constants C1, C2 read per sample from an external memory that the sample's
// upper bits address), then the corrected stream goes to both personality
// sections: the WSM section (threshold-triggered waveform zero suppression)
// and the CDM section (calorimeter gain selection with baseline subtraction).
// The personality select bit of the control register picks which of the two
// feeds the 16-word output buffer and the output bus. This structure follows
// the document's block diagram.
//
// Interfaces:
//  * Input bus. The bidirectional bus of the chip is split into `bus_in`
//    (what the bus carries) and `bus_out`/`bus_oe` (what the DCU drives, on
//    register reads); a pad ring joins them. External devices drive the bus
//    when `adc_oe` (input data buffer) or `cmem_oe` (constant memory, word
//    `cmem_sel`) is high, in clocks the DCU schedules itself.
//  * Sample handshake. `start`, taken while `ready` is high, runs one data
//    cycle of 16 clocks (maximum clock 21.3 MHz over maximum data rate
//    1.33 MHz). Starts every 16 clocks run at full rate.
//  * Registers. `reg_cs`/`reg_wr`/`reg_addr` access the registers of
//    dcu_regs, in clocks where `bus_free` is high.
//  * Output bus. `out_data` shows the oldest buffered word while `out_empty`
//    is low; `out_rd` takes it. `out_overflow` reports a dropped word.
//  * `events` pulses when a compaction mechanism acts; it is for monitoring.
// Latency: a corrected word leaves the ALU 20 clocks after the clock in which
// `start` was taken; compacted words reach the output buffer after that.
module dcu_top
  import dcu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // bidirectional input bus
  input  logic [15:0] bus_in,
  output logic [15:0] bus_out,
  output logic        bus_oe,
  // timing signals to the input data buffer and the constant memory
  input  logic        start,
  output logic        ready,
  output logic        adc_oe,
  output logic        cmem_oe,
  output logic        cmem_sel,
  output logic        bus_free,
  // register access
  input  logic        reg_cs,
  input  logic        reg_wr,
  input  logic [3:0]  reg_addr,
  // output bus
  output logic [15:0] out_data,
  output logic        out_empty,
  input  logic        out_rd,
  output logic        out_overflow,
  // one-clock event pulses for monitoring: {CDM override element, CDM chose
  // data1, CDM chose data0, WSM wire boundary, WSM record end, WSM record
  // start, WSM trigger}
  output logic [6:0]  events
);

  cfg_t    cfg;
  logic    clear;
  logic    ld_adc, ld_c1, ld_c2, alu_go, busy;
  logic    corr_valid;
  sample_t corr_sample;
  adc_t    adc_q;
  word_t   c1_q, c2_q;
  word_t   rdata;

  logic        wps_valid, cps_valid;
  word_t       wps_word, cps_word;
  logic [15:0] wps_addr;
  logic        wps_recording;  // monitoring only, not brought out
  logic        wps_ev_trig, wps_ev_start, wps_ev_end, wps_ev_bound;
  logic        cps_ev_sel0, cps_ev_sel1, cps_ev_ovr;

  logic        ob_wr, ob_full;  // full: overflow is reported instead
  word_t       ob_wdata;
  logic [4:0]  ob_count;

  dcu_timing u_timing (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .ready    (ready),
    .busy     (busy),
    .adc_oe   (adc_oe),
    .cmem_oe  (cmem_oe),
    .cmem_sel (cmem_sel),
    .ld_adc   (ld_adc),
    .ld_c1    (ld_c1),
    .ld_c2    (ld_c2),
    .alu_go   (alu_go),
    .bus_free (bus_free)
  );

  dcu_regs u_regs (
    .clk         (clk),
    .rst_n       (rst_n),
    .cs          (reg_cs),
    .wr          (reg_wr),
    .addr        (reg_addr_e'(reg_addr)),
    .wdata       (word_t'(bus_in)),
    .rdata       (rdata),
    .rd_oe       (bus_oe),
    .bus_free    (bus_free),
    .cfg         (cfg),
    .clear       (clear),
    .out_count   (ob_count),
    .out_empty   (out_empty),
    .overflow    (out_overflow),
    .busy        (busy),
    .adc_q       (adc_q),
    .c1_q        (c1_q),
    .c2_q        (c2_q),
    .bucket_addr (wps_addr)
  );
  assign bus_out = rdata;

  dcu_corrector u_corr (
    .clk        (clk),
    .rst_n      (rst_n),
    .bus_in     (word_t'(bus_in)),
    .ld_adc     (ld_adc),
    .ld_c1      (ld_c1),
    .ld_c2      (ld_c2),
    .alu_go     (alu_go),
    .en_adc     (cfg.ctrl.ld_adc),
    .en_const   (cfg.ctrl.ld_const),
    .shift_n    (cfg.ctrl.shift_n),
    .out_valid  (corr_valid),
    .out_sample (corr_sample),
    .adc_q      (adc_q),
    .c1_q       (c1_q),
    .c2_q       (c2_q)
  );

  dcu_wps u_wps (
    .clk             (clk),
    .rst_n           (rst_n),
    .clear           (clear),
    .in_valid        (corr_valid),
    .in_word         (corr_sample.y),
    .trig_th         (cfg.wsm_trig),
    .trail_th        (cfg.wsm_trail),
    .depth           (cfg.wsm_depth),
    .trail_cnt       (cfg.wsm_tcnt),
    .pass            (cfg.ctrl.wsm_pass),
    .wb_en           (cfg.ctrl.wb_en),
    .wb_1024         (cfg.ctrl.wb_1024),
    .out_valid       (wps_valid),
    .out_word        (wps_word),
    .addr            (wps_addr),
    .recording       (wps_recording),
    .ev_trigger      (wps_ev_trig),
    .ev_record_start (wps_ev_start),
    .ev_record_end   (wps_ev_end),
    .ev_boundary     (wps_ev_bound)
  );

  dcu_cps u_cps (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (clear),
    .in_valid    (corr_valid),
    .in_sample   (corr_sample),
    .thr         (cfg.cdm_thr),
    .sense       (cfg.ctrl.cdm_sense),
    .bsub        (cfg.ctrl.cdm_bsub),
    .override_en (cfg.ctrl.cdm_override),
    .mask        (cfg.cdm_mask),
    .out_valid   (cps_valid),
    .out_word    (cps_word),
    .ev_sel0     (cps_ev_sel0),
    .ev_sel1     (cps_ev_sel1),
    .ev_override (cps_ev_ovr)
  );

  assign events = {cps_ev_ovr, cps_ev_sel1, cps_ev_sel0,
                   wps_ev_bound, wps_ev_end, wps_ev_start, wps_ev_trig};

  // Personality select multiplexer.
  always_comb begin
    if (cfg.ctrl.pers_cdm) begin
      ob_wr    = cps_valid;
      ob_wdata = cps_word;
    end else begin
      ob_wr    = wps_valid;
      ob_wdata = wps_word;
    end
  end

  dcu_outbuf #(.DEPTH(16), .WIDTH(16)) u_outbuf (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear),
    .wr       (ob_wr),
    .wr_data  (ob_wdata),
    .rd       (out_rd),
    .rd_data  (out_data),
    .empty    (out_empty),
    .full     (ob_full),
    .count    (ob_count),
    .overflow (out_overflow)
  );

endmodule
