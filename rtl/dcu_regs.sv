// dcu_regs: programmable registers of the DCU on the bidirectional bus.
//
// The document states that the DCU's programmable registers are written and
// read over the same bus that carries input data and correction constants,
// and lists what is programmable: the load enables of the diagnostic modes,
// the shift n, the WSM trigger and trailing thresholds, history depth, trail
// count, pass-through and wire boundary interval, and the CDM threshold,
// decision sense, baseline subtraction and override. The address map and bit
// layout (see dcu_pkg) are this design's own.
//
// Interface: with `cs` high, `wr` high writes `wdata` into register `addr` at
// the clock edge; `wr` low reads, with `rdata` valid in the same clock and
// `rd_oe` asking the pad logic to drive the bus. A write of 1 to bit 0 of
// REG_COMMAND gives a one-clock `clear` pulse. Status (REG_STATUS) reads
// {8'b0, out_empty, busy, overflow, out_count[4:0]}. Accesses belong in the
// clocks in which no external device drives the bus (`bus_free`).
module dcu_regs
  import dcu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cs,
  input  logic       wr,
  input  reg_addr_e  addr,
  input  word_t      wdata,
  output word_t      rdata,
  output logic       rd_oe,
  input  logic       bus_free,
  output cfg_t       cfg,
  output logic       clear,
  // status and readback
  input  logic [4:0] out_count,
  input  logic       out_empty,
  input  logic       overflow,
  input  logic       busy,
  input  adc_t       adc_q,
  input  word_t      c1_q,
  input  word_t      c2_q,
  input  logic [15:0] bucket_addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.ctrl      <= CTRL_RESET;
      cfg.wsm_trig  <= 16'sd1000;
      cfg.wsm_trail <= 16'sd100;
      cfg.wsm_depth <= 7'd8;
      cfg.wsm_tcnt  <= 8'd4;
      cfg.cdm_thr   <= 15'd16384;
      cfg.cdm_mask  <= 4'hF;
      clear         <= 1'b0;
    end else begin
      clear <= 1'b0;
      if (cs && wr) begin
        unique case (addr)
          REG_CTRL:      cfg.ctrl      <= ctrl_t'(wdata[12:0]);
          REG_WSM_TRIG:  cfg.wsm_trig  <= wdata;
          REG_WSM_TRAIL: cfg.wsm_trail <= wdata;
          REG_WSM_DEPTH: cfg.wsm_depth <= (wdata[6:0] > 7'd64) ? 7'd64 : wdata[6:0];
          REG_WSM_TCNT:  cfg.wsm_tcnt  <= wdata[7:0];
          REG_CDM_THR:   cfg.cdm_thr   <= adc_t'(wdata);
          REG_CDM_MASK:  cfg.cdm_mask  <= wdata[3:0];
          REG_COMMAND:   clear         <= wdata[0];
          default: ;  // read-only registers ignore writes
        endcase
      end
    end
  end

  always_comb begin
    rd_oe = cs && !wr;
    unique case (addr)
      REG_CTRL:      rdata = word_t'({3'b000, cfg.ctrl});
      REG_WSM_TRIG:  rdata = cfg.wsm_trig;
      REG_WSM_TRAIL: rdata = cfg.wsm_trail;
      REG_WSM_DEPTH: rdata = word_t'(cfg.wsm_depth);
      REG_WSM_TCNT:  rdata = word_t'(cfg.wsm_tcnt);
      REG_CDM_THR:   rdata = word_t'(cfg.cdm_thr);
      REG_CDM_MASK:  rdata = word_t'(cfg.cdm_mask);
      REG_STATUS:    rdata = word_t'({out_empty, busy, overflow, out_count});
      REG_ADC:       rdata = word_t'(adc_q);
      REG_C1:        rdata = c1_q;
      REG_C2:        rdata = c2_q;
      REG_ADDR:      rdata = bucket_addr;
      default:       rdata = '0;
    endcase
  end

  // Register accesses share the bus with the input buffer and constant memory.
  assert property (@(posedge clk) disable iff (!rst_n) cs |-> bus_free)
    else $error("dcu_regs: register access while the bus carries data");

endmodule
