// dcu_pkg: types and constants shared by the Digital Correction Unit (DCU).
//
// The DCU corrects 15-bit unsigned ADC samples with a piece-wise linear
// curve (constants C1 and C2 read per sample from an external memory) and
// then compacts the corrected stream with one of two algorithms: the
// waveform (WSM) zero suppression or the calorimeter (CDM) gain selection.
// Data widths (15-bit input, 15 bits plus sign after correction), the shift
// range 1..8, the history depth of 64 and the 16-word output FIFO follow the
// document. The register map, its bit layout and the WSM tag value are this
// design's own choices.
package dcu_pkg;

  localparam int ADC_W   = 15;  // unsigned input data width
  localparam int WORD_W  = 16;  // corrected data: 15 significant bits plus sign
  localparam int REG_AW  = 4;   // register address width

  typedef logic [ADC_W-1:0]         adc_t;
  typedef logic signed [WORD_W-1:0] word_t;

  // Corrected data is kept in [-32767, 32767]; 0x8000 never appears as data
  // and is therefore free to serve as the unique WSM start-of-record tag.
  localparam word_t WSM_TAG   = 16'sh8000;
  localparam word_t WORD_MAX  = 16'sh7FFF;
  localparam word_t WORD_MIN  = -16'sh7FFF;

  // Register addresses on the bidirectional bus.
  typedef enum logic [REG_AW-1:0] {
    REG_CTRL      = 4'd0,   // see ctrl_t
    REG_WSM_TRIG  = 4'd1,   // WSM trigger threshold (signed)
    REG_WSM_TRAIL = 4'd2,   // WSM trailing threshold (signed)
    REG_WSM_DEPTH = 4'd3,   // WSM history depth n, 0..64
    REG_WSM_TCNT  = 4'd4,   // WSM trail count, 1..255 (0 acts as 1)
    REG_CDM_THR   = 4'd5,   // CDM threshold on uncorrected data0
    REG_CDM_MASK  = 4'd6,   // CDM override mask: bit i outputs group element i
    REG_COMMAND   = 4'd7,   // write bit 0: clear counters, personalities, FIFO
    REG_STATUS    = 4'd8,   // read only: see status word in dcu_regs
    REG_ADC       = 4'd9,   // read only: ADC register
    REG_C1        = 4'd10,  // read only: C1 register
    REG_C2        = 4'd11,  // read only: C2 register
    REG_ADDR      = 4'd12   // read only: bucket address counter
  } reg_addr_e;

  // Control register fields (REG_CTRL, LSB first in the struct's last field).
  typedef struct packed {
    logic       cdm_override;  // [12] output the masked group elements instead
    logic       cdm_bsub;      // [11] subtract the selected signal's baseline
    logic       cdm_sense;     // [10] 1: data0 optimal when above threshold
    logic       wb_1024;       // [9]  wire boundary every 1024 (else 512) buckets
    logic       wb_en;         // [8]  force recording at wire boundaries
    logic       wsm_pass;      // [7]  WSM pass-through: record every word
    logic [3:0] shift_n;       // [6:3] corrector shift n, 1..8
    logic       ld_const;      // [2]  load C1/C2 registers each data cycle
    logic       ld_adc;        // [1]  load ADC register each data cycle
    logic       pers_cdm;      // [0]  personality select: 1 CDM, 0 WSM
  } ctrl_t;

  localparam ctrl_t CTRL_RESET = '{cdm_override: 1'b0, cdm_bsub: 1'b0,
                                   cdm_sense: 1'b0, wb_1024: 1'b0,
                                   wb_en: 1'b0, wsm_pass: 1'b0,
                                   shift_n: 4'd1, ld_const: 1'b1,
                                   ld_adc: 1'b1, pers_cdm: 1'b0};

  // Programmable configuration handed to the datapath.
  typedef struct packed {
    ctrl_t      ctrl;
    word_t      wsm_trig;
    word_t      wsm_trail;
    logic [6:0] wsm_depth;
    logic [7:0] wsm_tcnt;
    adc_t       cdm_thr;
    logic [3:0] cdm_mask;
  } cfg_t;

  // A corrected sample as it leaves the corrector.
  typedef struct packed {
    word_t y;      // corrected value
    adc_t  raw;    // uncorrected ADC value it came from
  } sample_t;

  // Saturate a wider signed value to the data range [-32767, 32767].
  function automatic word_t sat_word(input logic signed [WORD_W+1:0] v);
    if (v > (WORD_W+2)'(WORD_MAX))      return WORD_MAX;
    else if (v < (WORD_W+2)'(WORD_MIN)) return WORD_MIN;
    else                   return v[WORD_W-1:0];
  endfunction

endpackage
