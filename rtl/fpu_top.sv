// fpu_top: single-precision IEEE-754 floating point unit.
//
// Each operand arrives as two 32-bit words, a sign-magnitude integer part
// and a binary fraction part. The operands are packed into effective
// operands (cnvrt_2_integral) and converted to IEEE-754 words
// (cnvrt_2_ieee), which are registered and also brought out as op1_ieee and
// op2_ieee. The selected operation then runs on the IEEE words:
//   fpu_op 0 add, 1 subtract (op1 - op2): pre_normalization aligns the
//            operands, fp_add / fp_sub (block carry-look-ahead adder) form
//            the magnitude sum or difference, and an add/subtract
//            post_normalization unit normalises and rounds by rmode
//   fpu_op 2 multiply, 3 divide, 5 square root of op1, 6 sine and cosine of
//            op1 (degrees): pre_normalization_mds prepares the operands for
//            multiplication (Karatsuba + bit-pair recoding), division
//            (non-restoring), squareroot (non-restoring) or trig_unit
//            (CORDIC), whose results share a second post_normalization unit
//   fpu_op 4 shift: the barrel shifter shifts op1's integer-part word by
//            shift_val places, left when shift_dir = 1; the word is returned
//            as it is, not in IEEE form
//   fpu_op 7 tangent of op1 (degrees): the CORDIC's sine and cosine, once
//            post-normalised, are fed back through pre_normalization_mds to
//            the divider, which forms sine / cosine
// exception_handling picks the result and the underflow, overflow, div_by_0,
// invalid and inexact flags. For fpu_op 6, oper_result is the sine and cos_result the
// cosine; cos_fx and sin_fx give both as 2048-scaled integers. For fpu_op 7,
// oper_result is the tangent, and cos_result, sin_fx and cos_fx are set as
// for fpu_op 6.
//
// Timing (rst synchronous, active high): start is sampled while busy is low
// and loads the converted operands. Add, subtract, multiply and shift
// complete on the next clock, so done pulses two clocks after start.
// Divide and square root take 3*24 iteration cycles plus five (77 clocks
// start to done), sine/cosine 16 clocks, tangent 16 + 77 = 93 clocks. oper_result, cos_result and the
// flags hold their values until the next operation completes.
//
// The operation codes, the operand packing, the unit algorithms and the
// 2-cycle add/multiply latency follow the design. The start/busy/done
// handshake, the invalid and inexact flags, the cosine output, rounding modes 1..3 and
// the way the tangent is formed (the design names it without a method) are
// this implementation's additions; with operands made from 31-bit
// integer and 32-bit fraction parts no result can leave the single-precision
// range, so overflow and underflow cannot occur at this level (the
// post-normalisation units still detect them).
module fpu_top
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [31:0] op1_int,
  input  logic [31:0] op1_frac,
  input  logic [31:0] op2_int,
  input  logic [31:0] op2_frac,
  input  logic [3:0]  fpu_op,
  input  logic [1:0]  rmode,
  input  logic        shift_dir,
  input  logic [4:0]  shift_val,
  output logic [31:0] op1_ieee,
  output logic [31:0] op2_ieee,
  output logic [31:0] oper_result,
  output logic [31:0] cos_result,
  output logic [15:0] sin_fx,
  output logic [15:0] cos_fx,
  output logic        underflow,
  output logic        overflow,
  output logic        div_by_0,
  output logic        invalid,
  output logic        inexact,
  output logic        busy,
  output logic        done
);

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_WAIT, S_TAN} state_e;

  state_e  state;
  fpu_op_e op_q;
  rmode_e  rm_q;
  ieee_t   a_q, b_q;
  logic [31:0] shift_src_q;
  logic        dir_q;
  logic [4:0]  sv_q;
  logic        tan_div;              // tangent: division phase
  ieee_t       tan_sin_q, tan_cos_q; // tangent: sine and cosine

  // ---------------------------------------------------------------- input
  logic [31:0]       eff1, eff2;
  logic signed [5:0] pos1, pos2;
  ieee_t             conv1, conv2;

  cnvrt_2_integral u_int1 (.int_part(op1_int), .frac_part(op1_frac), .eff(eff1), .pos(pos1));
  cnvrt_2_integral u_int2 (.int_part(op2_int), .frac_part(op2_frac), .eff(eff2), .pos(pos2));
  cnvrt_2_ieee     u_ieee1 (.eff(eff1), .pos(pos1), .ieee(conv1));
  cnvrt_2_ieee     u_ieee2 (.eff(eff2), .pos(pos2), .ieee(conv2));

  // ------------------------------------------------------ add / subtract
  ieee_t       b_eff;
  logic [23:0] big_mant, small_mant;
  logic [2:0]  small_grs;
  logic [7:0]  al_exp;
  logic        big_sign, small_sign;
  logic        eff_sub;
  unrounded_t  add_res, sub_res, as_res;
  ieee_t       as_result;
  logic        as_ovf, as_unf, as_inx;

  always_comb begin
    b_eff = b_q;
    if (op_q == OP_SUB) b_eff.sign = ~b_q.sign;
  end

  pre_normalization u_prenorm (
    .a(a_q), .b(b_eff),
    .big_mant(big_mant), .small_mant(small_mant), .small_grs(small_grs),
    .exp(al_exp), .big_sign(big_sign), .small_sign(small_sign), .swapped()
  );

  assign eff_sub = big_sign ^ small_sign;

  fp_add u_add (
    .big_mant(big_mant), .small_mant(small_mant), .small_grs(small_grs),
    .exp(al_exp), .sign(big_sign), .res(add_res), .co()
  );

  fp_sub u_sub (
    .big_mant(big_mant), .small_mant(small_mant), .small_grs(small_grs),
    .exp(al_exp), .sign(big_sign), .res(sub_res), .borrow()
  );

  always_comb begin
    as_res = eff_sub ? sub_res : add_res;
    // an exact zero difference is +0, or -0 when rounding towards -inf
    if (eff_sub && sub_res.sig == '0) as_res.sign = (rm_q == RM_NEG_INF);
  end

  post_normalization u_pn_as (
    .u(as_res), .rmode(rm_q), .result(as_result),
    .overflow(as_ovf), .underflow(as_unf), .inexact(as_inx)
  );

  // ------------------------------------ multiply / divide / sqrt / trig
  logic [23:0]              ma, mb;
  logic                     a_zero, b_zero, mds_sign;
  logic [24:0]              div_dividend;
  logic signed [XEXP_W-1:0] div_exp, sqrt_exp;
  logic [47:0]              sqrt_radicand;
  unrounded_t               mul_res, div_res, sqrt_res, sin_res, cos_res, mds_res;
  logic                     div_dz, div_inv, div_done;
  logic                     sqrt_inv, sqrt_done;
  logic                     trig_err, trig_done;
  logic                     div_start, sqrt_start, trig_start;
  ieee_t                    mds_result, cos_ieee;
  logic                     mds_ovf, mds_unf, mds_inx;
  ieee_t                    mds_a, mds_b;

  // the divider takes sine / cosine in the tangent's second phase
  assign mds_a = tan_div ? tan_sin_q : a_q;
  assign mds_b = tan_div ? tan_cos_q : b_q;

  pre_normalization_mds u_prenorm_mds (
    .a(mds_a), .b(mds_b), .ma(ma), .mb(mb), .a_zero(a_zero), .b_zero(b_zero), .res_sign(mds_sign),
    .div_dividend(div_dividend), .div_exp(div_exp),
    .sqrt_radicand(sqrt_radicand), .sqrt_exp(sqrt_exp)
  );

  multiplication u_mul (
    .sa(mds_a.sign), .sb(mds_b.sign), .ea(mds_a.exp), .eb(mds_b.exp),
    .ma(ma), .mb(mb), .res(mul_res)
  );

  assign div_start  = ((state == S_EXEC) && (op_q == OP_DIV)) || (state == S_TAN);
  assign sqrt_start = (state == S_EXEC) && (op_q == OP_SQRT);
  assign trig_start = (state == S_EXEC) && ((op_q == OP_TRIG) || (op_q == OP_TAN));

  division u_div (
    .clk(clk), .rst(rst), .start(div_start),
    .sa(mds_a.sign), .sb(mds_b.sign), .a_zero(a_zero), .b_zero(b_zero),
    .dividend(div_dividend), .divisor(mb), .exp_in(div_exp),
    .res(div_res), .div_by_0(div_dz), .invalid(div_inv), .done(div_done)
  );

  squareroot u_sqrt (
    .clk(clk), .rst(rst), .start(sqrt_start),
    .sa(a_q.sign), .a_zero(a_zero), .radicand(sqrt_radicand), .exp_in(sqrt_exp),
    .res(sqrt_res), .invalid(sqrt_inv), .done(sqrt_done)
  );

  trig_unit u_trig (
    .clk(clk), .rst(rst), .start(trig_start), .a(a_q),
    .sin_res(sin_res), .cos_res(cos_res), .sin_fx(sin_fx), .cos_fx(cos_fx),
    .range_err(trig_err), .done(trig_done)
  );

  always_comb begin
    unique case (op_q)
      OP_DIV:  mds_res = div_res;
      OP_SQRT: mds_res = sqrt_res;
      OP_TRIG: mds_res = sin_res;
      OP_TAN:  mds_res = tan_div ? div_res : sin_res;
      default: mds_res = mul_res;
    endcase
  end

  post_normalization u_pn_mds (
    .u(mds_res), .rmode(rm_q), .result(mds_result),
    .overflow(mds_ovf), .underflow(mds_unf), .inexact(mds_inx)
  );

  post_normalization u_pn_cos (
    .u(cos_res), .rmode(rm_q), .result(cos_ieee),
    .overflow(), .underflow(), .inexact()
  );

  // ---------------------------------------------------------------- shift
  logic [31:0] shift_result;

  barrel_shifter u_shift (
    .op(shift_src_q), .direction(dir_q), .shift_val(sv_q), .result(shift_result)
  );

  // ------------------------------------------------- result and flags
  logic [31:0] final_result;
  logic        f_ovf, f_unf, f_dz, f_inv, f_inx;

  exception_handling u_exc (
    .op(op_q),
    .addsub_result(as_result), .addsub_overflow(as_ovf), .addsub_underflow(as_unf),
    .addsub_inexact(as_inx), .mds_inexact(mds_inx),
    .mds_result(mds_result), .mds_overflow(mds_ovf), .mds_underflow(mds_unf),
    .shift_result(shift_result),
    .div_sign(mds_sign), .div_by_0_in(div_dz), .div_invalid(div_inv),
    .sqrt_invalid(sqrt_inv), .trig_invalid(trig_err),
    .result(final_result), .overflow(f_ovf), .underflow(f_unf),
    .div_by_0(f_dz), .invalid(f_inv), .inexact(f_inx)
  );

  // --------------------------------------------------------------- control
  logic unit_done;
  logic single_cycle;

  assign unit_done    = div_done | sqrt_done | trig_done;
  assign single_cycle = (op_q == OP_ADD) || (op_q == OP_SUB) ||
                        (op_q == OP_MUL) || (op_q == OP_SHIFT) ||
                        (op_q > OP_TAN);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      op_q        <= OP_ADD;
      rm_q        <= RM_TRUNC;
      a_q         <= '0;
      b_q         <= '0;
      shift_src_q <= '0;
      dir_q       <= 1'b0;
      sv_q        <= '0;
      tan_div     <= 1'b0;
      tan_sin_q   <= '0;
      tan_cos_q   <= '0;
      oper_result <= '0;
      cos_result  <= '0;
      underflow   <= 1'b0;
      overflow    <= 1'b0;
      div_by_0    <= 1'b0;
      invalid     <= 1'b0;
      inexact     <= 1'b0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_q         <= conv1;
          b_q         <= conv2;
          op_q        <= fpu_op_e'(fpu_op);
          rm_q        <= rmode_e'(rmode);
          shift_src_q <= op1_int;
          dir_q       <= shift_dir;
          sv_q        <= shift_val;
          state       <= S_EXEC;
        end
        S_EXEC: begin
          if (single_cycle) begin
            oper_result <= final_result;
            underflow   <= f_unf;
            overflow    <= f_ovf;
            div_by_0    <= f_dz;
            invalid     <= f_inv;
            inexact     <= f_inx;
            done        <= 1'b1;
            state       <= S_IDLE;
          end else begin
            state <= S_WAIT;
          end
        end
        S_WAIT: if (op_q == OP_TAN && !tan_div && trig_done && !trig_err) begin
          // tangent: keep sine and cosine, then divide
          tan_sin_q <= mds_result;
          tan_cos_q <= cos_ieee;
          tan_div   <= 1'b1;
          state     <= S_TAN;
        end else if (unit_done) begin
          oper_result <= final_result;
          if (op_q == OP_TRIG || op_q == OP_TAN) cos_result <= trig_err ? QNAN : cos_ieee;
          tan_div     <= 1'b0;
          underflow   <= f_unf;
          overflow    <= f_ovf;
          div_by_0    <= f_dz;
          invalid     <= f_inv;
          inexact     <= f_inx;
          done        <= 1'b1;
          state       <= S_IDLE;
        end
        S_TAN:   state <= S_WAIT;   // division started this clock
        default: state <= S_IDLE;
      endcase
    end
  end

  assign op1_ieee = a_q;
  assign op2_ieee = b_q;
  assign busy     = (state != S_IDLE);

endmodule
