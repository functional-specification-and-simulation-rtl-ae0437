// tb_fpu_signtype -- random operand signs, types and datapath flags for every opcode. The
// testbench works out the result sign from the real-number meaning of the operation (the
// magnitudes implied by the greater-exponent flag and the intermediate sign), the operand
// exception from the exception table, and the expected status word, and compares.
module tb_fpu_signtype;
  import spur_fpu_pkg::*;
  logic [9:0] opv;
  logic sa, sb, b_gt_a, inter_neg, sum_zero, res_zero, ovf, unf, inexact;
  logic [4:0] ta, tb;
  logic [1:0] rm;
  logic [2:0] cmp_mask;
  logic [63:0] fpsw_in, fpsw_new;
  logic sign, op_exc, fpsw_we;
  logic [4:0] rtype;
  int checks = 0, failures = 0;

  fpu_signtype dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int k;
      logic ws, wexc, magA_gt_B, sbe, lt, eq, gt, v, u, x, e;
      logic [63:0] wf;
      logic [2:0] da, db;
      k = $urandom() % 10;
      opv = 10'd1 << k;
      sa = 1'($urandom()); sb = 1'($urandom());
      da = 3'($urandom() % 5); db = 3'($urandom() % 5);
      ta = {2'($urandom()), da}; tb = {2'($urandom()), db};
      b_gt_a = 1'($urandom()); inter_neg = 1'($urandom()); sum_zero = ($urandom() % 6 == 0);
      res_zero = sum_zero; ovf = 1'($urandom()); unf = !ovf && 1'($urandom()); inexact = 1'($urandom());
      rm = 2'($urandom()); cmp_mask = 3'($urandom()); fpsw_in = {$urandom(), $urandom()};
      #1;
      // |left| > |right| when the intermediate (right - left) is negative
      magA_gt_B = b_gt_a ? !inter_neg : inter_neg;
      sbe = sb ^ (k == A_SUB || k == A_CMP);
      case (k)
        A_MOV: ws = sa;
        A_NEG: ws = !sa;
        A_ABS: ws = 0;
        A_MUL, A_DIV: ws = sa ^ sb;
        A_ADD, A_SUB, A_CMP: begin
          if (sa == sbe) ws = sa;
          else if (sum_zero) ws = (rm == RM_MINF);
          else ws = magA_gt_B ? sa : sbe;
        end
        default: ws = sa;
      endcase
      case (k)
        A_ADD, A_SUB, A_CMP: wexc = da >= DT_INF || db >= DT_INF;
        A_CVTD, A_CVTS:      wexc = da >= DT_INF;
        A_MUL:               wexc = da >= DT_INF || db >= DT_INF || da == DT_DENORM || db == DT_DENORM;
        A_DIV:               wexc = da >= DT_INF || db >= DT_INF || da == DT_DENORM || db == DT_DENORM || db == DT_ZERO;
        default:             wexc = 0;
      endcase
      checks++;
      if (sign !== ws || op_exc !== wexc) begin
        failures++; $display("FAIL sign/exc k=%0d got %b %b want %b %b", k, sign, op_exc, ws, wexc);
      end
      checks++;
      if (rtype !== {(k == A_CVTS) ? RT_SGL : (k == A_CVTD) ? RT_DBL : RT_EXT, res_zero ? DT_ZERO : DT_NORM}) begin
        failures++; $display("FAIL rtype");
      end
      // status word
      wf = fpsw_in;
      v = ovf && !res_zero && !wexc && k != A_CMP;
      u = unf && !res_zero && !wexc && k != A_CMP;
      x = inexact && !wexc && k != A_CMP;
      e = wexc || (fpsw_in[33] && (v || u)) || (fpsw_in[32] && x);
      lt = !sum_zero && ws; eq = sum_zero; gt = !sum_zero && !ws;
      if (k == A_CMP) wf[47] = !wexc && |(cmp_mask & {lt, eq, gt});
      wf[46] = e; wf[43] = v; wf[42] = x; wf[41] = u; wf[40] = wexc;
      wf[39:37] = (k == A_CVTD || k == A_CVTS) ? 3'b0 : db;
      wf[36:34] = da;
      checks++;
      if (fpsw_we !== !(k == A_MOV || k == A_NEG || k == A_ABS) || (fpsw_we && fpsw_new !== wf)) begin
        failures++; $display("FAIL fpsw k=%0d got %h want %h", k, fpsw_new, wf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
