// dcu_wps: WSM personality section, the waveform zero-suppression of the DCU.
//
// Corrected words pass through a history FIFO of programmable depth n
// (dcu_wsm_history), so the word leaving it is n samples older than the word
// entering. A live word above the trigger threshold starts a record that
// begins with the delayed word, i.e. n words before the trigger. A record is
// written as: the unique tag, the address of its first word, then data words.
// Once the trigger word itself has left the FIFO, each recorded word below the
// trailing threshold increments a trail counter and any other word resets it
// (so a double pulse that rises again is recorded whole); the record ends with
// the word that brings the counter to the trail count. Recording is also
// forced on by pass-through mode (every word is kept) and, when enabled, at
// each wire boundary (every 512 or 1024 buckets), where a new record with its
// own tag and address begins. All of this follows the document.
//
// This design's choices: the address is a 16-bit count of samples since
// `clear`, its low 9 or 10 bits being the bucket within a wire; the tag is
// 0x8000, a code that corrected data never takes (data equal to 0x8000 is
// output as -32767); "over" and "below" a threshold are strict comparisons;
// a record forced on at a wire boundary ends by the trail rule; words that
// would precede the first word after `clear` are not output; a trail count
// of 0 acts as 1.
//
// Timing: one sample per `in_valid`, at most one every 4 clocks (the DCU
// gives it one every 16). The up to three words a sample produces leave on
// `out_valid`/`out_word`, one per clock, starting the clock after `in_valid`.
module dcu_wps
  import dcu_pkg::*;
#(
  parameter int unsigned MAX_DEPTH = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  word_t in_word,
  input  word_t trig_th,
  input  word_t trail_th,
  input  logic [$clog2(MAX_DEPTH+1)-1:0] depth,
  input  logic [7:0] trail_cnt,
  input  logic  pass,
  input  logic  wb_en,
  input  logic  wb_1024,
  output logic  out_valid,
  output word_t out_word,
  output logic [15:0] addr,         // address of the live word
  output logic  recording,
  // event pulses, one clock each, for monitoring
  output logic  ev_trigger,         // live word over the trigger threshold
  output logic  ev_record_start,    // a tag is being issued
  output logic  ev_record_end,      // the trail count ended a record
  output logic  ev_boundary         // a wire boundary forced recording
);

  localparam int unsigned DW = $clog2(MAX_DEPTH+1);

  word_t       del_word;
  logic        del_valid;
  logic [DW-1:0] pend;          // delayed words left before the trigger word
  logic [7:0]  tcount;
  logic [15:0] del_addr;
  logic        trig_live, pre, boundary, keep, new_rec, below;
  logic [7:0]  tcount_nx, tcnt_eff;
  logic        stop;

  // pending output words of the current sample
  logic        q_tag, q_addr, q_data;
  logic [15:0] q_addr_val;
  word_t       q_data_val;

  dcu_wsm_history #(.MAX_DEPTH(MAX_DEPTH)) u_hist (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (clear),
    .in_valid  (in_valid),
    .in_word   (in_word),
    .depth     (depth),
    .del_word  (del_word),
    .del_valid (del_valid)
  );

  always_comb begin
    del_addr  = addr - 16'(depth);
    trig_live = in_word > trig_th;
    pre       = trig_live || (pend != '0);
    boundary  = wb_en && (wb_1024 ? (del_addr[9:0] == '0) : (del_addr[8:0] == '0));
    keep      = del_valid && (pre || pass || boundary || recording);
    new_rec   = keep && (!recording || boundary);
    below     = del_word < trail_th;
    tcnt_eff  = (trail_cnt == '0) ? 8'd1 : trail_cnt;
    if (pre || !below)         tcount_nx = '0;
    else if (tcount != 8'hFF)  tcount_nx = tcount + 1'b1;
    else                       tcount_nx = tcount;
    stop      = keep && !pre && !pass && (tcount_nx >= tcnt_eff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr      <= '0;
      pend      <= '0;
      tcount    <= '0;
      recording <= 1'b0;
    end else if (clear) begin
      addr      <= '0;
      pend      <= '0;
      tcount    <= '0;
      recording <= 1'b0;
    end else if (in_valid) begin
      addr <= addr + 1'b1;
      if (trig_live)        pend <= depth;
      else if (pend != '0)  pend <= pend - 1'b1;
      if (keep) begin
        tcount    <= tcount_nx;
        recording <= !stop;
      end
    end
  end

  // Output sequencer: tag, address, data, one per clock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_tag      <= 1'b0;
      q_addr     <= 1'b0;
      q_data     <= 1'b0;
      q_addr_val <= '0;
      q_data_val <= '0;
      out_valid  <= 1'b0;
      out_word   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        q_tag  <= 1'b0;
        q_addr <= 1'b0;
        q_data <= 1'b0;
      end else if (in_valid && !clear) begin
        q_tag      <= new_rec;
        q_addr     <= new_rec;
        q_data     <= keep;
        q_addr_val <= del_addr;
        q_data_val <= (del_word == WSM_TAG) ? WORD_MIN : del_word;
      end else if (q_tag) begin
        q_tag     <= 1'b0;
        out_valid <= 1'b1;
        out_word  <= WSM_TAG;
      end else if (q_addr) begin
        q_addr    <= 1'b0;
        out_valid <= 1'b1;
        out_word  <= word_t'(q_addr_val);
      end else if (q_data) begin
        q_data    <= 1'b0;
        out_valid <= 1'b1;
        out_word  <= q_data_val;
      end
    end
  end

  always_comb begin
    ev_trigger      = in_valid && trig_live;
    ev_record_start = in_valid && new_rec;
    ev_record_end   = in_valid && stop;
    ev_boundary     = in_valid && keep && boundary;
  end

  // A new sample must not arrive while words of the previous one are queued.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> !(q_tag || q_addr || q_data))
    else $error("dcu_wps: samples arrive faster than words can leave");

endmodule
