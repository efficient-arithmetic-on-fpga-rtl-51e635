// tb_mod_correct: every input value below NMULT*P for the default block
// (P = 241, NMULT = 16) and for P = 4051, NMULT = 16; residue and quotient
// are compared with % and /.
module tb_mod_correct;

  int checks = 0, failures = 0;

  logic [11:0] s_a; logic [7:0]  r_a; logic [3:0] q_a;
  logic [15:0] s_b; logic [11:0] r_b; logic [3:0] q_b;

  mod_correct                              u_a (.s(s_a), .r(r_a), .q(q_a));
  mod_correct #(.P(4051), .NMULT(16), .SW(16)) u_b (.s(s_b), .r(r_b), .q(q_b));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16 * 241; v++) begin
      s_a = 12'(v);
      #1;
      checks++;
      if (r_a != 8'(v % 241) || q_a != 4'(v / 241)) begin
        failures++; $display("FAIL P=241 s=%0d r=%0d q=%0d", v, r_a, q_a);
      end
    end
    for (int v = 0; v < 16 * 4051; v += 7) begin
      s_b = 16'(v);
      #1;
      checks++;
      if (r_b != 12'(v % 4051) || q_b != 4'(v / 4051)) begin
        failures++; $display("FAIL P=4051 s=%0d r=%0d q=%0d", v, r_b, q_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
