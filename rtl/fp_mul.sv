// fp_mul: a three-cycle floating-point functional unit (MULF), two of which
// sit behind the FP1 and FP2 reservation stations.
//
// IEEE-754 single-precision multiply, spread over three X stages:
//   X1  unpack, add exponents, 24x24-bit significand product
//   X2  normalise the 48-bit product, form guard and sticky bits
//   X3  round to nearest even, detect overflow/underflow, pack
// then a completion register (C) that requests the CDB. Subnormal inputs
// are read as zero and subnormal results are flushed to signed zero;
// overflow gives infinity; NaN, or infinity times zero, gives the quiet NaN
// 0x7FC00000. The pipeline advances as a whole whenever the completion
// register can take a new result, so while a result waits for the CDB the
// unit neither advances nor accepts (fu_ready low).
// Timing: issue S, X in S+1..S+3, CDB request from S+4 (mulf: S c4, X c5-c7,
// C c8 in the document's example). Three cycles and two units are the
// document's; the number format and its corner cases are this design's.
module fp_mul
  import p6_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  input  issue_t  in,
  output logic    fu_ready,
  output result_t res,
  input  logic    grant
);
  typedef struct packed {
    logic        valid;
    tag_t        tag;
    logic        sign;
    logic        nan, inf, zero;
    logic signed [9:0] exp;   // unbiased-sum exponent, still biased by 127
    logic [47:0] prod;
  } s1_t;

  typedef struct packed {
    logic        valid;
    tag_t        tag;
    logic        sign;
    logic        nan, inf, zero;
    logic signed [9:0] exp;
    logic [22:0] mant;
    logic        guard, sticky;
  } s2_t;

  s1_t     s1_q, s1_d;
  s2_t     s2_q, s2_d;
  issue_t  x_q;
  result_t s3_d, c_q;
  logic    adv;

  assign adv      = !c_q.valid || grant;
  assign fu_ready = adv;
  assign res      = c_q;

  // X1: unpack and multiply
  always_comb begin
    logic [7:0]  ea, eb;
    logic [22:0] ma, mb;
    logic        za, zb, ia, ib, na, nb;
    ea = x_q.v1[30:23];  ma = x_q.v1[22:0];
    eb = x_q.v2[30:23];  mb = x_q.v2[22:0];
    za = (ea == 8'd0);  zb = (eb == 8'd0);
    ia = (ea == 8'hFF) && (ma == '0);
    ib = (eb == 8'hFF) && (mb == '0);
    na = (ea == 8'hFF) && (ma != '0);
    nb = (eb == 8'hFF) && (mb != '0);
    s1_d       = '0;
    s1_d.valid = x_q.valid;
    s1_d.tag   = x_q.t;
    s1_d.sign  = x_q.v1[31] ^ x_q.v2[31];
    s1_d.nan   = na || nb || (ia && zb) || (ib && za);
    s1_d.inf   = (ia || ib) && !s1_d.nan;
    s1_d.zero  = (za || zb) && !s1_d.nan && !s1_d.inf;
    s1_d.exp   = $signed({2'b00, ea}) + $signed({2'b00, eb}) - 10'sd127;
    s1_d.prod  = {1'b1, ma} * {1'b1, mb};
  end

  // X2: normalise
  always_comb begin
    s2_d       = '0;
    s2_d.valid = s1_q.valid;
    s2_d.tag   = s1_q.tag;
    s2_d.sign  = s1_q.sign;
    s2_d.nan   = s1_q.nan;
    s2_d.inf   = s1_q.inf;
    s2_d.zero  = s1_q.zero;
    if (s1_q.prod[47]) begin
      s2_d.exp    = s1_q.exp + 10'sd1;
      s2_d.mant   = s1_q.prod[46:24];
      s2_d.guard  = s1_q.prod[23];
      s2_d.sticky = |s1_q.prod[22:0];
    end else begin
      s2_d.exp    = s1_q.exp;
      s2_d.mant   = s1_q.prod[45:23];
      s2_d.guard  = s1_q.prod[22];
      s2_d.sticky = |s1_q.prod[21:0];
    end
  end

  // X3: round and pack
  always_comb begin
    logic [23:0]       mr;
    logic signed [9:0] e;
    mr = {1'b0, s2_q.mant} + 24'(s2_q.guard && (s2_q.sticky || s2_q.mant[0]));
    e  = s2_q.exp;
    if (mr[23]) e = e + 10'sd1;   // rounding carried out: significand is 1.0
    s3_d       = '0;
    s3_d.valid = s2_q.valid;
    s3_d.tag   = s2_q.tag;
    s3_d.exc   = EXC_NONE;
    if (s2_q.nan)
      s3_d.value = 32'h7FC0_0000;
    else if (s2_q.inf || e >= 10'sd255)
      s3_d.value = {s2_q.sign, 8'hFF, 23'd0};
    else if (s2_q.zero || e <= 10'sd0)
      s3_d.value = {s2_q.sign, 31'd0};
    else
      s3_d.value = {s2_q.sign, e[7:0], mr[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q  <= '0;
      s1_q <= '0;
      s2_q <= '0;
      c_q  <= '0;
    end else if (flush) begin
      x_q.valid  <= 1'b0;
      s1_q.valid <= 1'b0;
      s2_q.valid <= 1'b0;
      c_q.valid  <= 1'b0;
    end else if (adv) begin
      x_q  <= in;
      s1_q <= s1_d;
      s2_q <= s2_d;
      c_q  <= s3_d;
    end
  end
endmodule
