// tb_arith_top: end-to-end test of arith_top at its default parameters.
//
// Drives all four operators with corner and random operands and compares
// every output with the same operation written with SystemVerilog's own
// *, / and % operators. It also counts how often each mechanism of the
// method was used, and fails if one never was:
//   - the final correction subtracted at least one multiple of the modulus
//     (modular multiplication, reduction, division residue), and left a sum
//     already below the modulus unchanged;
//   - the division's small correction quotient was non-zero, so it was added
//     to the summed partial quotients;
//   - a carry-select adder took its carry-in-1 upper half (top adder of the
//     constant multiplier's tree and the division's final adder).
module tb_arith_top;

  int checks = 0, failures = 0;

  logic [9:0]   cm_a; logic [192:0] cm_p;
  logic [11:0]  mm_a, mm_b, mm_r;
  logic [269:0] mr_a; logic [7:0]   mr_r;
  logic [63:0]  dv_a, dv_q; logic [7:0] dv_r;

  arith_top dut (
    .cm_a(cm_a), .cm_p(cm_p),
    .mm_a(mm_a), .mm_b(mm_b), .mm_r(mm_r),
    .mr_a(mr_a), .mr_r(mr_r),
    .dv_a(dv_a), .dv_q(dv_q), .dv_r(dv_r)
  );

  int n_mm_sub, n_mm_none, n_mr_sub, n_mr_none, n_dv_sub, n_dv_none;
  int n_cm_carry, n_dv_carry;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(string what, int n);
    checks++;
    $display("%-40s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never used: %s", what); end
  endtask

  initial begin
    logic [192:0] c183;
    c183 = (193'(1) << 183) - 193'(1);
    {n_mm_sub, n_mm_none, n_mr_sub, n_mr_none, n_dv_sub, n_dv_none} = '0;
    {n_cm_carry, n_dv_carry} = '0;
    for (int t = 0; t < 5000; t++) begin
      cm_a = 10'($urandom);
      mm_a = 12'($urandom);
      mm_b = 12'($urandom);
      for (int w = 0; w < 9; w++) mr_a[w*30 +: 30] = 30'($urandom);
      dv_a = {32'($urandom), 32'($urandom)};
      case (t)
        0: begin cm_a = '1; mm_a = '1; mm_b = '1; mr_a = '1; dv_a = '1; end
        1: begin cm_a = '0; mm_a = '0; mm_b = '0; mr_a = '0; dv_a = '0; end
        2: begin mm_a = 12'd1; mm_b = 12'd5; mr_a = 270'd200; dv_a = 64'd7; end
        // quotients whose low 32 bits are zero: the division's final adder
        // must then carry into its upper half
        default: if (t % 10 == 7) begin
          dv_a = {8'd0, 24'($urandom), 32'd0} * 64'd241 + 64'($urandom % 241);
        end else if (t % 3 == 0) begin
          dv_a = dv_a >> ($urandom % 64);
          mr_a = mr_a >> ($urandom % 270);
        end
      endcase
      #1;
      checks += 4;
      if (cm_p != 193'(cm_a) * c183) begin
        failures++; $display("FAIL const_mult a=%0d", cm_a);
      end
      if (mm_r != 12'((int'(mm_a) * int'(mm_b)) % 4051)) begin
        failures++; $display("FAIL mod_mult %0d*%0d -> %0d", mm_a, mm_b, mm_r);
      end
      if (mr_r != 8'(mr_a % 270'(241))) begin
        failures++; $display("FAIL mod_reduce t=%0d -> %0d", t, mr_r);
      end
      if (dv_q != dv_a / 64'd241 || dv_r != 8'(dv_a % 64'd241)) begin
        failures++; $display("FAIL const_div %0d -> q=%0d r=%0d", dv_a, dv_q, dv_r);
      end
      if (dut.u_mmul.u_corr.q != 0) n_mm_sub++; else n_mm_none++;
      if (dut.u_mred.u_corr.q != 0) n_mr_sub++; else n_mr_none++;
      if (dut.u_cdiv.u_corr.q != 0) n_dv_sub++; else n_dv_none++;
      if (dut.u_cmul.u_sum.g_lvl[1].g_add.g_node[0].g_pair.u_add.g_split.lo[94]) n_cm_carry++;
      if (dut.u_cdiv.u_qadd.g_split.lo[32]) n_dv_carry++;
    end
    need("mod_mult: multiple of P subtracted",      n_mm_sub);
    need("mod_mult: sum already below P",           n_mm_none);
    need("mod_reduce: multiple of P subtracted",    n_mr_sub);
    need("mod_reduce: sum already below P",         n_mr_none);
    need("const_div: residue sum corrected",        n_dv_sub);
    need("const_div: residue sum already below D",  n_dv_none);
    need("const_mult: carry-select upper half",     n_cm_carry);
    need("const_div: carry-select upper half",      n_dv_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
