// processing_unit: one-bit multiply-and-add unit of the processing array.
//
// All signals are one-bit bipolar streams (bit 1 = +1, bit 0 = -1; a stream's
// value is its mean). The unit has the three function blocks of the array's
// processing unit:
//   F1, F2  each select one of the NCAND candidate streams and, if told to,
//           multiply it by a second one (bipolar product = XNOR) and/or
//           negate it (bit inversion).
//   F3      combines the F1 and F2 results, op from pu_cfg_t.op:
//           PASS  y = F1
//           AVE   y = (F1+F2)/2, exact: a one-bit residual r keeps the half
//                 that could not be sent, so no random select stream is needed
//           ADD   y = sat(F1+F2): first-order sigma-delta loop, the signed
//                 integrator acc (the loop filter) accumulates F1+F2-y and
//                 y is its sign
//           HALF  y = F1/2: AVE against an internal alternating (value 0) stream
//           DIV   y = sat(F1/F2) for F2 > 0: the output is fed back and
//                 multiplied by F2; acc integrates F1 - y*F2 and y is its sign
//           SQR   y = F1 * F1 delayed one cycle (needs a stream whose
//                 successive bits are independent, as dithered streams are)
//           SQRT  y = sqrt(F1) for F1 >= 0: a second, wider integrator sq
//                 (SQ_W bits) integrates F1 - y(t)*y(t-1), and y is drawn
//                 by comparing sq with a pseudo-random sample from the
//                 unit's own LFSR, so that successive y bits are independent
//                 and their product estimates y^2; the loop settles where
//                 y^2 = F1. sq is held at or above 0, so y >= 0 (a negative
//                 F1 gives 0) and the loop cannot lock onto the negative root
//           LUT2  any 2-input logic function of (F1,F2): lut[{F1,F2}]
//           LUT3  3-input control logic of (F1,F2,y): lut[{F1,F2,y}]
//
// Timing: F1/F2 results are registered (stage 1), F3 state is registered
// (stage 2), and the output is registered (stage 3): a function takes 3
// cycles from candidate input to out_o, the single-function latency of the
// array. The DIV, ADD and SQRT loops close around stage 2 only.
//
// The division into F1/F2/F3, the feedback through F1/F2 for divide, and
// the loop filter follow the array's description; the bit-level form of
// each operation, the integrator width and the latency split are this
// design's choice.
module processing_unit
  import ppa_pkg::*;
#(
  parameter int unsigned ACC_W = 6,           // ADD/DIV loop-filter integrator width (signed)
  parameter int unsigned SQ_W  = 10,          // SQRT integrator width (signed)
  parameter logic [15:0] SEED  = 16'h1D0F     // SQRT dither LFSR seed (non-zero)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  pu_cfg_t          cfg,
  input  logic [NCAND-1:0] cand,    // candidate input streams
  output logic             out_o    // output stream (registered)
);

  localparam logic signed [ACC_W-1:0] ACC_MAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] ACC_MIN = {1'b1, {(ACC_W-1){1'b0}}};

  // ---------------------------------------------------------------- F1, F2
  function automatic logic fsel_eval(input fsel_cfg_t c, input logic [NCAND-1:0] s);
    logic v;
    v = s[c.sel_a];
    if (c.mul) v = ~(v ^ s[c.sel_b]);
    return v ^ c.inv;
  endfunction

  logic p_q, q_q, p_prev_q;   // stage 1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q      <= 1'b0;
      q_q      <= 1'b0;
      p_prev_q <= 1'b0;
    end else if (en) begin
      p_q      <= fsel_eval(cfg.f1, cand);
      q_q      <= fsel_eval(cfg.f2, cand);
      p_prev_q <= p_q;
    end
  end

  // ---------------------------------------------------------------- SQRT dither
  // 16-bit Galois LFSR (mask 16'hB400), eight steps per cycle.
  logic [15:0] lfsr_q, lfsr_d;
  always_comb begin
    lfsr_d = lfsr_q;
    for (int i = 0; i < 8; i++)
      lfsr_d = lfsr_d[0] ? ((lfsr_d >> 1) ^ 16'hB400) : (lfsr_d >> 1);
  end

  // ---------------------------------------------------------------- F3
  logic                    y_q, y_d;       // stage 2 result
  logic                    r_q, r_d;       // AVE/HALF residual
  logic                    tog_q;          // alternating stream (value 0)
  logic signed [ACC_W-1:0] acc_q, acc_d;   // loop filter
  logic signed [SQ_W-1:0]  sq_q, sq_d;     // SQRT integrator
  logic                    y_prev_q;       // y one cycle earlier
  localparam logic signed [SQ_W-1:0] SQ_MAX = {1'b0, {(SQ_W-1){1'b1}}};

  function automatic logic signed [ACC_W-1:0] sat_add(input logic signed [ACC_W-1:0] a,
                                                      input logic signed [3:0] d);
    logic signed [ACC_W:0] s;
    s = (ACC_W+1)'(a) + (ACC_W+1)'(d);
    if (s > (ACC_W+1)'(ACC_MAX)) return ACC_MAX;
    if (s < (ACC_W+1)'(ACC_MIN)) return ACC_MIN;
    return s[ACC_W-1:0];
  endfunction

  // Bipolar bit as a signed +1/-1.
  function automatic logic signed [3:0] pm(input logic b);
    return b ? 4'sd1 : -4'sd1;
  endfunction

  always_comb begin
    logic [1:0] s;
    logic       half_in;
    logic signed [SQ_W+1:0] sq_sum;
    logic signed [SQ_W:0]   sq_cmp;
    y_d   = y_q;
    r_d   = r_q;
    acc_d = acc_q;
    sq_d  = sq_q;
    sq_sum = '0;
    sq_cmp = '0;
    s     = '0;
    half_in = 1'b0;
    unique case (cfg.op)
      F3_PASS: y_d = p_q;
      F3_AVE, F3_HALF: begin
        half_in = (cfg.op == F3_HALF) ? tog_q : q_q;
        s   = 2'(p_q) + 2'(half_in) + 2'(r_q);
        y_d = s[1];
        r_d = s[0];
      end
      F3_ADD: begin
        acc_d = sat_add(acc_q, pm(p_q) + pm(q_q) - pm(y_q));
        y_d   = ~acc_d[ACC_W-1];
      end
      F3_DIV: begin
        acc_d = sat_add(acc_q, pm(p_q) - pm(~(y_q ^ q_q)));
        y_d   = ~acc_d[ACC_W-1];
      end
      F3_SQR:  y_d = ~(p_q ^ p_prev_q);
      F3_SQRT: begin
        sq_sum = (SQ_W+2)'(sq_q) + (SQ_W+2)'(pm(p_q)) - (SQ_W+2)'(pm(~(y_q ^ y_prev_q)));
        if (sq_sum > (SQ_W+2)'(SQ_MAX))      sq_d = SQ_MAX;
        else if (sq_sum < 0)                 sq_d = '0;
        else                                 sq_d = sq_sum[SQ_W-1:0];
        // y = 1 with probability (sq + 2^(SQ_W-1)) / 2^SQ_W
        sq_cmp = (SQ_W+1)'(sq_d) + (SQ_W+1)'(signed'(lfsr_q[SQ_W-1:0]));
        y_d    = ~sq_cmp[SQ_W];
      end
      F3_LUT2: y_d = cfg.lut[{1'b0, p_q, q_q}];
      F3_LUT3: y_d = cfg.lut[{p_q, q_q, y_q}];
      default: y_d = p_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q   <= 1'b0;
      y_prev_q <= 1'b0;
      sq_q  <= '0;
      lfsr_q <= (SEED == 16'h0) ? 16'h1 : SEED;
      r_q   <= 1'b0;
      tog_q <= 1'b0;
      acc_q <= '0;
      out_o <= 1'b0;
    end else if (en) begin
      y_q   <= y_d;
      y_prev_q <= y_q;
      sq_q  <= sq_d;
      lfsr_q <= lfsr_d;
      r_q   <= r_d;
      tog_q <= ~tog_q;
      acc_q <= acc_d;
      out_o <= y_q;        // stage 3
    end
  end

endmodule
