// dcu_ref_pkg: reference models used by the DCU testbenches.
//
// Each function recomputes, from the algorithm's definition and with plain
// integer arithmetic, what the hardware should produce:
//  * ref_correct: y = 2^(n-16) * x * (C2 - C1) + C1, x being the low 16-n bits
//    of the sample, rounded toward minus infinity and limited to +-32767.
//  * ref_wps: the WSM record stream for a whole sample sequence, found by
//    looking ahead for triggers instead of counting down to them.
//  * ref_cps: the CDM output word of one base0/data0/base1/data1 group.
package dcu_ref_pkg;

  localparam int TAG = 32'hFFFF8000;  // 0x8000 as a signed 16-bit value

  function automatic int ref_correct(int adc, int n, int c1, int c2);
    longint x, d, p, y;
    int nn;
    nn = (n < 1) ? 1 : (n > 8) ? 8 : n;
    x  = longint'(adc % (1 << (16 - nn)));
    d  = longint'(c2 - c1);
    // the subtractor is 16 bits wide: wrap to a signed 16-bit value
    d  = ((d + 32768) % 65536 + 65536) % 65536 - 32768;
    p  = x * (longint'(1) << nn) * d;           // value * 2^16
    // floor(p / 2^16) for either sign
    y  = (p >= 0) ? (p / 65536) : -((-p + 65535) / 65536);
    y  = y + longint'(c1);
    if (y > 32767)  y = 32767;
    if (y < -32767) y = -32767;
    return int'(y);
  endfunction

  typedef struct {
    int trig, trail, depth, tcnt;
    bit pass, wb_en, wb_1024;
  } wps_cfg_t;

  // Expected WSM output for samples x[0..N-1]. Only the words that have
  // left the history FIFO (index <= N-1-depth) are considered.
  function automatic void ref_wps(input int x[$], input wps_cfg_t c,
                                  ref int out[$]);
    bit rec;
    int cnt, wb, last;
    rec  = 0;
    cnt  = 0;
    wb   = c.wb_1024 ? 1024 : 512;
    last = x.size() - 1 - c.depth;
    for (int i = 0; i <= last; i++) begin
      bit pre, bnd, keep;
      int tc;
      pre = 0;
      for (int s = i; s <= i + c.depth; s++)
        if (x[s] > c.trig) pre = 1;
      bnd  = c.wb_en && ((i % wb) == 0);
      keep = pre || c.pass || bnd || rec;
      tc   = (c.tcnt == 0) ? 1 : c.tcnt;
      if (keep) begin
        if (!rec || bnd) begin
          out.push_back(TAG);
          out.push_back(i % 65536 >= 32768 ? i % 65536 - 65536 : i % 65536);
        end
        out.push_back(x[i] == TAG ? -32767 : x[i]);
        if (pre || x[i] >= c.trail) cnt = 0;
        else if (cnt < 255)         cnt++;
        rec = !(!pre && !c.pass && cnt >= tc);
      end
    end
  endfunction

  // Expected CDM word (as a 16-bit pattern) in normal mode.
  function automatic int ref_cps(int b0, int d0, int b1, int d1, int raw_d0,
                                 int thr, bit sense, bit bsub);
    bit use0;
    int v;
    use0 = sense ? (raw_d0 > thr) : (raw_d0 < thr);
    v = use0 ? d0 - (bsub ? b0 : 0) : d1 - (bsub ? b1 : 0);
    if (v < 0) v = 0;
    if (v > 32767) v = 32767;
    return (use0 ? 0 : 32768) + v;
  endfunction

endpackage
