// tb_mod_reduce: the default reducer (270-bit operand, P = 241) and a
// 168-bit, P = 997 instance on corner and random operands; expected residues
// come from the % operator on the full-width operand.
module tb_mod_reduce;

  int checks = 0, failures = 0;

  logic [269:0] a;    logic [7:0] r;
  logic [167:0] a168; logic [9:0] r168;

  mod_reduce                          u_dut (.a(a),    .r(r));
  mod_reduce #(.WA(168), .P(997))     u_168 (.a(a168), .r(r168));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int w = 0; w < 9; w++) a[w*30 +: 30] = 30'($urandom);
      case (t)
        0: a = '1;
        1: a = '0;
        2: a = 270'(241) * 270'(123456789);
        3: a = 270'(240);
        default: ;
      endcase
      a168 = a[167:0];
      #1;
      checks += 2;
      if (r != 8'(a % 270'(241))) begin failures++; $display("FAIL 270/241 t=%0d r=%0d", t, r); end
      if (r168 != 10'(a168 % 168'(997))) begin failures++; $display("FAIL 168/997 t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
