// srisc_exf: floating point execution unit EXF, four pipeline stages.
//
// IEEE-754 single precision FADD, FSUB and FMUL on values held in the common
// register set. Stage 0 is the unit's input pipeline register and each later
// stage has its own register, so a result reaches write back four cycles
// after dispatch, against one cycle in EXI and EXLS:
//   stage 0: unpack; for add/sub order the operands by magnitude;
//   stage 1: multiply the 24-bit significands, or align the smaller addend
//            (bits shifted out are kept as a sticky bit) and add/subtract;
//   stage 2: normalise with a leading-zero count;
//   stage 3: round to nearest even, detect overflow (to infinity) and
//            underflow (to zero), pack; the result is offered to write back.
// The whole pipeline holds when stage 3 is not granted the write-back slot;
// issue to the unit is then blocked. Subnormal inputs are read as zero and
// subnormal results are flushed to zero; infinities and NaNs get no special
// treatment. The description only asks for a unit of at least four stages;
// the operation set, the stage split and these simplifications are this
// design's choices.
module srisc_exf
  import srisc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  ex_pkt_t in_pkt,
  output logic    ready,
  output logic    done_valid,
  output wb_pkt_t done_pkt,
  input  logic    grant
);
  typedef struct packed {
    logic   has_dest;
    preg_t  dest;
    iwidx_t iw_idx;
  } tag_t;

  // Value of a stage-1..3 packet: (-1)^sign * n / 2^47 * 2^(e - 127).
  typedef struct packed {
    logic              v;
    tag_t              tag;
    logic              sign;
    logic signed [10:0] e;
    logic              zero;
    logic              mul;
    logic              sub;    // effective subtraction
    logic [23:0]       ma;
    logic [23:0]       mb;
    logic [7:0]        d;      // alignment shift for add/sub
    logic [47:0]       n;
  } st_t;

  logic    v0;
  ex_pkt_t q0;
  st_t     s1, s2, s3, n1, n2, n3;
  logic    adv;

  assign adv   = !s3.v || grant;
  assign ready = adv;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v0   <= 1'b0;
      s1.v <= 1'b0;
      s2.v <= 1'b0;
      s3.v <= 1'b0;
    end else if (adv) begin
      v0 <= in_valid;
      s1 <= n1;
      s2 <= n2;
      s3 <= n3;
    end
    if (adv && in_valid) q0 <= in_pkt;
  end

  // Stage 0: unpack and order operands.
  always_comb begin
    logic [7:0]  ea, eb;
    logic [22:0] fa, fb;
    logic        sa, sb;
    logic        za, zb;
    n1          = '0;
    n1.v        = v0;
    n1.tag      = '{q0.has_dest, q0.dest, q0.iw_idx};
    sa = q0.a[31]; ea = q0.a[30:23]; fa = q0.a[22:0];
    sb = q0.b[31]; eb = q0.b[30:23]; fb = q0.b[22:0];
    if (q0.op == OP_FSUB) sb = !sb;
    za = (ea == 8'd0);
    zb = (eb == 8'd0);
    n1.mul = (q0.op == OP_FMUL);
    if (n1.mul) begin
      n1.sign = sa ^ sb;
      n1.zero = za || zb;
      n1.e    = 11'(ea) + 11'(eb) - 11'sd126;
      n1.ma   = {1'b1, fa};
      n1.mb   = {1'b1, fb};
    end else if (za && zb) begin
      n1.zero = 1'b1;
      n1.sign = sa && sb;
    end else if (zb || (!za && {ea, fa} >= {eb, fb})) begin
      n1.sign = sa;
      n1.e    = 11'(ea);
      n1.ma   = {1'b1, fa};
      n1.mb   = zb ? 24'd0 : {1'b1, fb};
      n1.d    = zb ? 8'd0 : ea - eb;
      n1.sub  = sa ^ sb;
    end else begin
      n1.sign = sb;
      n1.e    = 11'(eb);
      n1.ma   = {1'b1, fb};
      n1.mb   = za ? 24'd0 : {1'b1, fa};
      n1.d    = za ? 8'd0 : eb - ea;
      n1.sub  = sa ^ sb;
    end
  end

  // Stage 1: significand product, or aligned sum/difference.
  always_comb begin
    logic [47:0] a, b, bs;
    logic [48:0] sum;
    logic        sticky;
    n2     = s1;
    a      = '0;
    b      = '0;
    bs     = '0;
    sum    = '0;
    sticky = 1'b0;
    if (s1.mul) begin
      n2.n = 48'(s1.ma) * 48'(s1.mb);
    end else begin
      a      = {s1.ma, 24'd0};
      b      = {s1.mb, 24'd0};
      bs     = (s1.d >= 8'd48) ? 48'd0 : b >> s1.d;
      sticky = (s1.d >= 8'd48) ? (b != 48'd0) : ((bs << s1.d) != b);
      bs[0]  = bs[0] | sticky;
      if (s1.sub) sum = {1'b0, a} - {1'b0, bs};
      else        sum = {1'b0, a} + {1'b0, bs};
      if (sum[48]) begin
        n2.n = {sum[48:2], sum[1] | sum[0]};
        n2.e = s1.e + 11'sd1;
      end else begin
        n2.n = sum[47:0];
      end
      if (sum == 49'd0 && !s1.zero) begin
        n2.zero = 1'b1;
        n2.sign = 1'b0;
      end
    end
  end

  // Stage 2: normalise so that bit 47 is the leading one.
  always_comb begin
    int lz;
    n3 = s2;
    lz = 0;
    for (int i = 0; i < 48; i++) if (s2.n[47 - i] == 1'b0 && lz == i) lz = i + 1;
    if (lz == 48) begin
      n3.zero = 1'b1;
    end else begin
      n3.n = s2.n << lz;
      n3.e = s2.e - 11'(lz);
    end
  end

  // Stage 3: round to nearest even and pack.
  always_comb begin
    logic [24:0]        m;
    logic               up;
    logic signed [10:0] e;
    word_t              r;
    up = s3.n[23] && ((|s3.n[22:0]) || s3.n[24]);
    m  = {1'b0, s3.n[47:24]} + 25'(up);
    e  = s3.e;
    if (m[24]) begin
      m = m >> 1;
      e = e + 11'sd1;
    end
    if (s3.zero || e <= 0) r = {s3.sign, 31'd0};
    else if (e >= 255)     r = {s3.sign, 8'hFF, 23'd0};
    else                   r = {s3.sign, e[7:0], m[22:0]};
    done_pkt          = '0;
    done_pkt.has_dest = s3.tag.has_dest;
    done_pkt.dest     = s3.tag.dest;
    done_pkt.iw_idx   = s3.tag.iw_idx;
    done_pkt.result   = r;
  end

  assign done_valid = s3.v;
endmodule
