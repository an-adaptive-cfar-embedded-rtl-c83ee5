// log_lut: two-port logarithm look-up table for Q11.5 samples.
//
// The CFAR thresholds are evaluated in the log domain, so every sample that
// takes part in a test is first turned into log2(X). Instead of computing the
// logarithm, the sample indexes a table whose step grows with the input:
//   X <  10          step 1/32 (exact: one entry per sample code)
//   10 <= X < 100    step 1/8
//   100 <= X < 2048  step 1
// The table is split in two banks, as two on-chip memory blocks would be:
// bank 0 covers X < 400 (1340 words), bank 1 covers 400 <= X < 2048 (1648
// words). Each entry is log2 of the middle of its step (of the sample itself
// in the finest segment), signed Q5.10, rounded. X = 0 reads as log2(1/32).
// The step sizes follow the piecewise approximation of the source design
// (0.03 / 0.1 / 1) rounded to powers of two so that the address is a shift;
// the use of base 2 is this design's choice (the threshold tests hold in any
// base). Contents are computed at elaboration with integer arithmetic.
//
// Interface: addr_a/addr_b are samples, log_a/log_b the logarithms one clock
// later (registered read, as in a block RAM). No reset: the read registers
// always hold a table word.
module log_lut
  import acosd_pkg::*;
(
  input  logic    clk,
  input  sample_t addr_a,
  input  sample_t addr_b,
  output log_t    log_a,
  output log_t    log_b
);

  localparam int SEG_A_END = 10  << SAMPLE_FRAC;   // 320
  localparam int SEG_B_END = 100 << SAMPLE_FRAC;   // 3200
  localparam int BANK_SPLIT = 400 << SAMPLE_FRAC;  // 12800
  localparam int SEG_B_SH  = 2;                    // step 1/8
  localparam int SEG_C_SH  = SAMPLE_FRAC;          // step 1
  localparam int B0_SEGB   = SEG_A_END;
  localparam int B0_SEGC   = B0_SEGB + ((SEG_B_END - SEG_A_END) >> SEG_B_SH);
  localparam int B0_DEPTH  = B0_SEGC + ((BANK_SPLIT - SEG_B_END) >> SEG_C_SH);   // 1340
  localparam int B1_DEPTH  = ((1 << DW) - BANK_SPLIT) >> SEG_C_SH;                // 1648

  typedef log_t bank0_t [B0_DEPTH];
  typedef log_t bank1_t [B1_DEPTH];

  // round(log2(v) * 2^LOG_FRAC) for v >= 1, by repeated squaring of the
  // normalised mantissa (one extra bit for rounding).
  function automatic int log2_fix(input longint unsigned v);
    int              e;
    longint unsigned m;
    int              r;
    e = 0;
    for (int i = 0; i < 40; i++)
      if ((v >> i) != 0) e = i;
    m = (v << 30) >> e;                     // Q1.30 in [1, 2)
    r = e << (LOG_FRAC + 1);
    for (int i = LOG_FRAC; i >= 0; i--) begin
      m = (m * m) >> 30;
      if (m >= (64'd2 << 30)) begin
        m = m >> 1;
        r = r + (1 << i);
      end
    end
    return (r + 1) >>> 1;
  endfunction

  // log2 of a bucket [s, s+w) of sample codes, taken at its middle:
  // log2((2s + w) / 2^(SAMPLE_FRAC+1)).
  function automatic log_t bucket_log(input int s, input int w);
    int v;
    if (w == 1) begin
      v = (s == 0) ? 1 : s;
      return log_t'(log2_fix(longint'(v)) - (SAMPLE_FRAC << LOG_FRAC));
    end
    v = 2 * s + w;
    return log_t'(log2_fix(longint'(v)) - ((SAMPLE_FRAC + 1) << LOG_FRAC));
  endfunction

  function automatic bank0_t gen_bank0();
    bank0_t t;
    for (int i = 0; i < B0_DEPTH; i++) begin
      if (i < B0_SEGB)      t[i] = bucket_log(i, 1);
      else if (i < B0_SEGC) t[i] = bucket_log(SEG_A_END + ((i - B0_SEGB) << SEG_B_SH), 1 << SEG_B_SH);
      else                  t[i] = bucket_log(SEG_B_END + ((i - B0_SEGC) << SEG_C_SH), 1 << SEG_C_SH);
    end
    return t;
  endfunction

  function automatic bank1_t gen_bank1();
    bank1_t t;
    for (int i = 0; i < B1_DEPTH; i++)
      t[i] = bucket_log(BANK_SPLIT + (i << SEG_C_SH), 1 << SEG_C_SH);
    return t;
  endfunction

  localparam bank0_t BANK0 = gen_bank0();
  localparam bank1_t BANK1 = gen_bank1();

  typedef struct packed {
    logic        hi;     // 1: bank 1
    logic [10:0] word;   // word address within the bank
  } lut_addr_t;

  function automatic lut_addr_t map_addr(input sample_t x);
    lut_addr_t a;
    int        xi;
    xi = int'(x);
    a.hi = (xi >= BANK_SPLIT);
    if (xi < SEG_A_END)       a.word = 11'(xi);
    else if (xi < SEG_B_END)  a.word = 11'(B0_SEGB + ((xi - SEG_A_END) >> SEG_B_SH));
    else if (xi < BANK_SPLIT) a.word = 11'(B0_SEGC + ((xi - SEG_B_END) >> SEG_C_SH));
    else                      a.word = 11'((xi - BANK_SPLIT) >> SEG_C_SH);
    return a;
  endfunction

  lut_addr_t ma, mb;
  log_t      b0_a, b1_a, b0_b, b1_b;
  logic      hi_a, hi_b;

  always_comb begin
    ma = map_addr(addr_a);
    mb = map_addr(addr_b);
  end

  // Both banks are read every cycle; the bank select is registered with the
  // data and picks the word on the output side.
  always_ff @(posedge clk) begin
    b0_a <= BANK0[(ma.word < 11'(B0_DEPTH)) ? ma.word : 11'd0];
    b1_a <= BANK1[(ma.word < 11'(B1_DEPTH)) ? ma.word : 11'd0];
    b0_b <= BANK0[(mb.word < 11'(B0_DEPTH)) ? mb.word : 11'd0];
    b1_b <= BANK1[(mb.word < 11'(B1_DEPTH)) ? mb.word : 11'd0];
    hi_a <= ma.hi;
    hi_b <= mb.hi;
  end

  assign log_a = hi_a ? b1_a : b0_a;
  assign log_b = hi_b ? b1_b : b0_b;

endmodule
