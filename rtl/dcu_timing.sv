// dcu_timing: data-cycle sequencer ("Timing and Control") of the DCU.
//
// Each input sample takes one data cycle of CYCLE_CLKS clocks. The default of
// 16 is the ratio of the maximum clock (21.3 MHz) to the maximum input data
// rate (1.33 MHz). A data cycle starts on the clock after `start` is seen
// while `ready` is high, and then walks a phase counter:
//   phase 0  adc_oe          the external input data buffer drives the bus;
//                            ld_adc strobes the ADC register load
//   phase 1  cmem_oe, sel=0  the constant memory drives C1; ld_c1 strobe
//   phase 2  cmem_oe, sel=1  the constant memory drives C2; ld_c2 strobe
//   phase 3  alu_go          the corrector starts the ALU on the new operands
// The remaining phases leave the bus free for register accesses. `ready` is
// high while idle and in the last phase, so starts spaced CYCLE_CLKS clocks
// apart run back to back. The segment address of the constant memory comes
// from the upper bits of the sample, outside the DCU, as the document
// describes; only its enables come from here. The order and placement of the
// phases are this design's choice: the document only says the corrector
// provides these timing signals.
module dcu_timing #(
  parameter int unsigned CYCLE_CLKS = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,     // external: a new sample is waiting in the input buffer
  output logic ready,     // a start will be accepted on this clock
  output logic busy,      // a data cycle is in progress
  output logic adc_oe,    // input data buffer output enable
  output logic cmem_oe,   // constant memory output enable
  output logic cmem_sel,  // constant memory word select: 0 C1, 1 C2
  output logic ld_adc,    // load strobe, ADC register (end of this clock)
  output logic ld_c1,     // load strobe, C1 register
  output logic ld_c2,     // load strobe, C2 register
  output logic alu_go,    // start the ALU on the loaded operands
  output logic bus_free   // no external device drives the bus this clock
);

  localparam int unsigned PW = $clog2(CYCLE_CLKS);

  logic [PW-1:0] phase;
  logic          active;
  logic          last;

  assign last  = active && (phase == PW'(CYCLE_CLKS - 1));
  assign ready = !active || last;
  assign busy  = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      phase  <= '0;
    end else if (start && ready) begin
      active <= 1'b1;
      phase  <= '0;
    end else if (last) begin
      active <= 1'b0;
    end else if (active) begin
      phase  <= phase + 1'b1;
    end
  end

  always_comb begin
    adc_oe   = active && (phase == PW'(0));
    cmem_oe  = active && (phase == PW'(1) || phase == PW'(2));
    cmem_sel = active && (phase == PW'(2));
    ld_adc   = adc_oe;
    ld_c1    = active && (phase == PW'(1));
    ld_c2    = active && (phase == PW'(2));
    alu_go   = active && (phase == PW'(3));
    bus_free = !(adc_oe || cmem_oe);
  end

  initial assert (CYCLE_CLKS >= 16)
    else $error("dcu_timing: the serial ALU needs at least 16 clocks per data cycle");

endmodule
