// dcu_cps: CDM personality section, the calorimeter gain selection of the DCU.
//
// Each calorimeter channel reaches the DCU as a group of four samples in the
// order base0, data0, base1, data1: the baseline and data of the gain-1
// amplifier, then those of the gain-2 amplifier. The uncorrected value of
// data0 is compared with a programmable threshold; `sense` says whether data0
// is the better signal when it is above (1) or below (0) the threshold. The
// corrected value of the chosen signal, optionally minus its own corrected
// baseline, is output as one word whose most significant bit is 0 for data0
// and 1 for data1, so four samples become one word. In override mode the
// decision is bypassed and every group element whose `mask` bit is set
// (bit 0 = base0 ... bit 3 = data1) is output as its full corrected word.
// This follows the document.
//
// This design's choices: the comparison is strict; the 15-bit value field is
// the result clamped to 0..32767; the group position restarts at base0 after
// `clear`; the word leaves on the clock after data1 (override: after each
// masked element).
module dcu_cps
  import dcu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    in_valid,
  input  sample_t in_sample,
  input  adc_t    thr,
  input  logic    sense,
  input  logic    bsub,
  input  logic    override_en,
  input  logic [3:0] mask,
  output logic    out_valid,
  output word_t   out_word,
  output logic    ev_sel0,       // a group ended choosing data0
  output logic    ev_sel1,       // a group ended choosing data1
  output logic    ev_override    // an element left in override mode
);

  logic [1:0] pos;     // 0 base0, 1 data0, 2 base1, 3 data1
  word_t      base0, data0, base1;
  logic       sel1;
  logic       data0_ok;
  word_t      chosen, chosen_base;
  logic signed [WORD_W+1:0] diff;
  logic [ADC_W-1:0] value;

  assign data0_ok = sense ? (in_sample.raw > thr) : (in_sample.raw < thr);

  always_comb begin
    chosen      = sel1 ? in_sample.y : data0;
    chosen_base = sel1 ? base1 : base0;
    diff        = (WORD_W+2)'(chosen) - (bsub ? (WORD_W+2)'(chosen_base) : '0);
    if (diff < 0)                          value = '0;
    else if (diff > (WORD_W+2)'(16'h7FFF)) value = '1;
    else                                   value = diff[ADC_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      base0     <= '0;
      data0     <= '0;
      base1     <= '0;
      sel1      <= 1'b0;
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        pos <= '0;
      end else if (in_valid) begin
        pos <= pos + 1'b1;
        unique case (pos)
          2'd0: base0 <= in_sample.y;
          2'd1: begin
            data0 <= in_sample.y;
            sel1  <= !data0_ok;
          end
          2'd2: base1 <= in_sample.y;
          2'd3: ;
        endcase
        if (override_en) begin
          if (mask[pos]) begin
            out_valid <= 1'b1;
            out_word  <= in_sample.y;
          end
        end else if (pos == 2'd3) begin
          out_valid <= 1'b1;
          out_word  <= {sel1, value};
        end
      end
    end
  end

  always_comb begin
    ev_sel0     = in_valid && !clear && !override_en && pos == 2'd3 && !sel1;
    ev_sel1     = in_valid && !clear && !override_en && pos == 2'd3 && sel1;
    ev_override = in_valid && !clear && override_en && mask[pos];
  end

endmodule
