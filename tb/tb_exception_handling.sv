// tb_exception_handling: drives random results and flag inputs for every
// operation code and compares the selected result and the five flags with
// a behavioural model of the selection rules (special-case priority:
// invalid before divide-by-zero before the computed value).
module tb_exception_handling;
  import fpu_pkg::*;
  fpu_op_e op;
  logic [31:0] as_r, mds_r, sh_r, res;
  logic as_o, as_u, m_o, m_u, dsign, dz, dinv, sinv, tinv, as_i, m_i;
  logic ovf, unf, d0, inv, inx;
  int checks = 0, failures = 0;

  exception_handling dut (.op(op), .addsub_result(as_r), .addsub_overflow(as_o), .addsub_underflow(as_u),
    .addsub_inexact(as_i), .mds_inexact(m_i), .mds_result(mds_r), .mds_overflow(m_o), .mds_underflow(m_u), .shift_result(sh_r), .div_sign(dsign),
    .div_by_0_in(dz), .div_invalid(dinv), .sqrt_invalid(sinv), .trig_invalid(tinv),
    .result(res), .overflow(ovf), .underflow(unf), .div_by_0(d0), .invalid(inv), .inexact(inx));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] er;
    logic eo, eu, ed, ei, ex;
    for (int t = 0; t < 20000; t++) begin
      op = fpu_op_e'(4'($urandom % 8));
      as_r = $urandom; mds_r = $urandom; sh_r = $urandom;
      {as_o, as_u, m_o, m_u, dsign, dz, dinv, sinv, tinv, as_i, m_i} = 11'($urandom);
      #1;
      eo = 0; eu = 0; ed = 0; ei = 0; ex = 0;
      case (op)
        OP_ADD, OP_SUB: begin er = as_r; eo = as_o; eu = as_u; ex = as_i; end
        OP_SHIFT: er = sh_r;
        OP_DIV:
          if (dinv) begin er = 32'h7FC00000; ei = 1; end
          else if (dz) begin er = {dsign, 8'hFF, 23'b0}; ed = 1; end
          else begin er = mds_r; eo = m_o; eu = m_u; ex = m_i; end
        OP_SQRT:
          if (sinv) begin er = 32'h7FC00000; ei = 1; end
          else begin er = mds_r; eo = m_o; eu = m_u; ex = m_i; end
        OP_TRIG:
          if (tinv) begin er = 32'h7FC00000; ei = 1; end
          else begin er = mds_r; eo = m_o; eu = m_u; ex = 1; end
        OP_TAN:
          if (tinv) begin er = 32'h7FC00000; ei = 1; end
          else if (dz) begin er = {dsign, 8'hFF, 23'b0}; ed = 1; end
          else begin er = mds_r; eo = m_o; eu = m_u; ex = 1; end
        default: begin er = mds_r; eo = m_o; eu = m_u; ex = m_i; end
      endcase
      checks++;
      if (res !== er || ovf !== eo || unf !== eu || d0 !== ed || inv !== ei || inx !== ex) begin
        failures++;
        if (failures < 10) $display("FAIL op %0d: %h/%b%b%b%b expected %h/%b%b%b%b", op, res, ovf, unf, d0, inv, er, eo, eu, ed, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
