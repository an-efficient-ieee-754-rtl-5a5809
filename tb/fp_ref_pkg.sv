// fp_ref_pkg: reference arithmetic for the FPU testbenches, worked out
// independently of the RTL.
//
// Values are computed in double precision (`real`) and then rounded to
// single precision here with the FPU's four rounding modes, flushing results
// below the normal range to zero and handling overflow as IEEE-754 does.
// Operations on single-precision operands that are exact in double
// (add/sub with close exponents, multiply) give exact references; for divide
// and square root the double result is within 2^-29 ulp, so a mismatch from
// double rounding is possible only for results lying almost exactly on a
// rounding boundary. The two-part operand conversion is modelled with 64-bit
// integers.
package fp_ref_pkg;

  // 2^e for -300 < e < 300
  function automatic real pow2(int e);
    real r;
    r = 1.0;
    for (int i = 0; i < 300; i++) begin
      if (i < e)  r = r * 2.0;
      if (i < -e) r = r / 2.0;
    end
    return r;
  endfunction

  // value of an IEEE-754 single word (normal numbers and zero)
  function automatic real real_of_ieee(logic [31:0] w);
    real m;
    real scale;
    int  e;
    e     = int'(w[30:23]) - 127;
    scale = 1.0;
    for (int i = 0; i < 128; i++) begin
      if (i < e)  scale = scale * 2.0;
      if (i < -e) scale = scale / 2.0;
    end
    m = real'({1'b1, w[22:0]}) / 8388608.0 * scale;
    if (w[30:23] == 8'd0) m = 0.0;
    if (w[31]) m = -m;
    return m;
  endfunction

  // round a double to single precision: rmode 0 trunc, 1 nearest even,
  // 2 towards +inf, 3 towards -inf. sticky_in adds an "inexact below" hint.
  function automatic logic [31:0] ieee_of_real(real r, logic [1:0] rmode,
                                                output logic ovf, output logic unf);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] m53;
    logic [24:0] m;
    logic        g, st, up, to_inf;
    d   = $realtobits(r);
    s   = d[63];
    ovf = 1'b0;
    unf = 1'b0;
    if (d[62:52] == 11'd0) return {s, 31'b0};
    e   = int'(d[62:52]) - 1023 + 127;
    m53 = {1'b1, d[51:0]};
    m   = {1'b0, m53[52:29]};
    g   = m53[28];
    st  = |m53[27:0];
    case (rmode)
      2'd0: up = 1'b0;
      2'd1: up = g & (st | m[0]);
      2'd2: up = ~s & (g | st);
      default: up = s & (g | st);
    endcase
    m = m + 25'(up);
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    to_inf = (rmode == 2'd1) || (rmode == 2'd2 && !s) || (rmode == 2'd3 && s);
    if (e > 254) begin
      ovf = 1'b1;
      return to_inf ? {s, 8'hFF, 23'b0} : {s, 8'hFE, 23'h7FFFFF};
    end
    if (e < 1) begin
      unf = 1'b1;
      return {s, 31'b0};
    end
    return {s, 8'(e), m[22:0]};
  endfunction

  // two-part operand (sign-magnitude integer part, fraction part) to IEEE,
  // truncating, through a 63-bit fixed-point integer
  function automatic logic [31:0] ieee_of_parts(logic [31:0] ip, logic [31:0] fp);
    logic [62:0] n;
    int          lead;
    logic [62:0] sh;
    n    = {ip[30:0], fp};
    lead = -1;
    for (int i = 0; i < 63; i++) if (n[i]) lead = i;
    // the packed 31-bit form keeps at most 31 significant bits
    if (lead < 0) return {ip[31], 31'b0};
    sh = n << (62 - lead);
    return {ip[31], 8'(lead - 32 + 127), sh[61:39]};
  endfunction

endpackage
