// dcu_corrector: the DCU's piece-wise linear corrector.
//
// The ADC register, C1 register and C2 register load from the input bus on
// the strobes of dcu_timing. The upper bits of the 15-bit sample select the
// curve segment outside the chip (they address the constant memory); the
// remaining offset field x is aligned to the ALU's most significant bit by a
// left shift of n-1 places, n = 1..8 programmable, so that
//   y = 2^(n-16) * x * (C2 - C1) + C1,
// with the result truncated to 15 bits plus sign. n = 1 leaves a 15-bit
// offset (one segment); n = 8 leaves an 8-bit offset with 7 segment bits
// (128 segments). The segment bits simply fall off the top of the shifter.
//
// Diagnostic modes (from the document): clearing ld_adc or ld_const stops the
// corresponding registers from loading on each data cycle. Loading suitable
// constants once and then clearing ld_const freezes the correction curve,
// which is how a pass-through is set up (C1 = 0, C2 = 0x4000 with n = 2
// passes 14-bit data unchanged). Values of n outside 1..8 are clamped, and the
// subtractor wraps in 16 bits: both are this design's choices.
//
// Timing: a result leaves on `out_valid` 16 clocks after `alu_go`.
module dcu_corrector
  import dcu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  word_t   bus_in,        // input bus (ADC word or constant)
  input  logic    ld_adc,        // strobes from dcu_timing
  input  logic    ld_c1,
  input  logic    ld_c2,
  input  logic    alu_go,
  input  logic    en_adc,        // control register: load ADC each cycle
  input  logic    en_const,      // control register: load C1/C2 each cycle
  input  logic [3:0] shift_n,    // control register: n
  output logic    out_valid,     // one corrected sample
  output sample_t out_sample,
  output adc_t    adc_q,         // register contents, for readback
  output word_t   c1_q,
  output word_t   c2_q
);

  logic [3:0] n_eff;
  adc_t       xs;
  word_t      diff;
  logic       alu_busy;  // not needed: dcu_timing spaces the ALU starts

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_q <= '0;
      c1_q  <= '0;
      c2_q  <= '0;
    end else begin
      if (ld_adc && en_adc)   adc_q <= adc_t'(bus_in);
      if (ld_c1  && en_const) c1_q  <= bus_in;
      if (ld_c2  && en_const) c2_q  <= bus_in;
    end
  end

  // Shifter and subtractor.
  always_comb begin
    if (shift_n < 4'd1)      n_eff = 4'd1;
    else if (shift_n > 4'd8) n_eff = 4'd8;
    else                     n_eff = shift_n;
    xs   = adc_q << (n_eff - 4'd1);
    diff = c2_q - c1_q;
  end

  dcu_alu u_alu (
    .clk     (clk),
    .rst_n   (rst_n),
    .go      (alu_go),
    .xs      (xs),
    .d       (diff),
    .c1      (c1_q),
    .raw_in  (adc_q),
    .busy    (alu_busy),
    .y_valid (out_valid),
    .y       (out_sample.y),
    .raw_out (out_sample.raw)
  );

endmodule
