// srisc_tb_pkg: reference helpers shared by the testbenches.
//
// Single-precision values are converted to and from the simulator's double
// precision reals, so reference results come from the host's floating point
// arithmetic rather than from the design's own algorithm. real_to_f32 rounds
// to nearest even and applies the same conventions as the design: results
// below the normal range become signed zero, results above it infinity.
// Products of two singles and sums of singles whose exponents differ by at
// most 29 are exact in double precision, so one rounding step gives the
// correctly rounded single result.
package srisc_tb_pkg;
  import srisc_pkg::*;

  function automatic real f32_to_real(logic [31:0] f);
    real m;
    int  e;
    e = int'(f[30:23]);
    if (e == 0) return $bitstoreal({f[31], 63'd0});
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * (2.0 ** (e - 127));
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] real_to_f32(real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] mr;
    logic        up;
    int          e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    m  = {1'b1, d[51:0]};
    up = m[28] && ((|m[27:0]) || m[29]);
    mr = {1'b0, m[52:29]} + 25'(up);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  // Random normal single with magnitude in [2^(lo-127), 2^(hi-127+1)).
  function automatic logic [31:0] rand_f32(int lo, int hi);
    int e;
    e = lo + int'($urandom_range(hi - lo));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  function automatic word_t enc(op_e op, int rd, int rs1, int rs2, int imm);
    return {op, 4'(rd), 4'(rs1), 4'(rs2), 14'(imm)};
  endfunction
endpackage
