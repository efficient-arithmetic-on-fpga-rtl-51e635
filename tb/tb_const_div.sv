// tb_const_div: the default divider (64-bit dividend, D = 241) and a 16-bit,
// D = 5 instance on corner and random dividends; quotient and residue are
// compared with / and %.
module tb_const_div;

  int checks = 0, failures = 0;

  logic [63:0] a, q;    logic [7:0] r;
  logic [15:0] a16, q16; logic [2:0] r16;

  const_div                     u_dut (.a(a),   .q(q),   .r(r));
  const_div #(.WA(16), .D(5))   u_16  (.a(a16), .q(q16), .r(r16));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      a = {32'($urandom), 32'($urandom)};
      case (t)
        0: a = '1;
        1: a = '0;
        2: a = 64'd240;
        3: a = 64'd241;
        4: a = 64'd241 * 64'd76543210987;
        5: a = 64'(t) >> 1;
        default: if (t % 4 == 1) a = a >> ($urandom % 60);
      endcase
      a16 = a[15:0];
      #1;
      checks += 2;
      if (q != a / 64'd241 || r != 8'(a % 64'd241)) begin
        failures++; $display("FAIL 64/241 a=%0d q=%0d r=%0d", a, q, r);
      end
      if (q16 != a16 / 16'd5 || r16 != 3'(a16 % 16'd5)) begin
        failures++; $display("FAIL 16/5 a=%0d q=%0d r=%0d", a16, q16, r16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
