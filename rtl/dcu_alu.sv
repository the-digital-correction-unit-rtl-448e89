// dcu_alu: corrector ALU of the DCU, a serial multiplier followed by an adder.
//
// Computes y = (xs * d) / 2^15 + c1, where xs is the 15-bit unsigned
// multiplicand (the sample's offset field after the left shifter), d = C2-C1
// is the 16-bit signed multiplier (15 bits plus sign) and c1 the first
// correction constant. The 30-bit-plus-sign product keeps only its most
// significant 15 bits plus sign (an arithmetic shift right by 15, i.e.
// truncation toward minus infinity) before c1 is added. All of this follows
// the document. The multiplier works one multiplicand bit per clock, adding
// d << i into an accumulator: the document gives a 16:1 ratio between clock
// and data rate but not the multiplier structure, so this serial form is
// this design's choice. The sum is saturated to [-32767, 32767] (also this
// design's choice), which keeps the code 0x8000 free for the WSM tag.
//
// Timing: `go` latches the operands; `y_valid` pulses exactly 16 clocks later
// with the result. A new `go` is accepted on the same clock as `y_valid`, so
// one result per 16 clocks is sustained. `raw` travels with the operands.
module dcu_alu
  import dcu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  go,
  input  logic [ADC_W-1:0] xs,   // shifted offset field, weight 2^-15
  input  word_t d,               // C2 - C1
  input  word_t c1,
  input  adc_t  raw_in,          // uncorrected sample, passed along
  output logic  busy,
  output logic  y_valid,
  output word_t y,
  output adc_t  raw_out
);

  localparam int PW = ADC_W + WORD_W;  // 31-bit signed product

  logic [ADC_W-1:0]      mcand;
  word_t                 mplier;
  word_t                 c1_q;
  adc_t                  raw_q;
  logic signed [PW-1:0]  acc;
  logic [3:0]            cnt;
  logic signed [WORD_W+1:0] sum;

  // Product's top 15 bits plus sign, plus c1, in 18 bits so it cannot wrap.
  assign sum = (WORD_W+2)'(acc >>> ADC_W) + (WORD_W+2)'(c1_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      y_valid <= 1'b0;
      y       <= '0;
      raw_out <= '0;
      mcand   <= '0;
      mplier  <= '0;
      c1_q    <= '0;
      raw_q   <= '0;
      acc     <= '0;
      cnt     <= '0;
    end else begin
      y_valid <= 1'b0;
      if (busy) begin
        if (cnt == 4'(ADC_W)) begin
          y       <= sat_word(sum);
          raw_out <= raw_q;
          y_valid <= 1'b1;
          busy    <= 1'b0;
        end else begin
          if (mcand[cnt])
            acc <= acc + (PW'(mplier) <<< cnt);
          cnt <= cnt + 1'b1;
        end
      end
      if (go && (!busy || cnt == 4'(ADC_W))) begin
        mcand   <= xs;
        mplier  <= d;
        c1_q    <= c1;
        raw_q   <= raw_in;
        acc     <= '0;
        cnt     <= '0;
        busy    <= 1'b1;
      end
    end
  end

  // A start while a product is half done would lose it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   go |-> (!busy || cnt == 4'(ADC_W)))
    else $error("dcu_alu: go while busy");

endmodule
