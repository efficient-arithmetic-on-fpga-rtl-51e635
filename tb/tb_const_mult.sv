// tb_const_mult: the default multiplier (10-bit a times 2^183 - 1) for every
// value of a, plus a 7-bit a times 2^29 - 3; products are formed here with
// the * operator on wide vectors.
module tb_const_mult;

  int checks = 0, failures = 0;

  logic [9:0]   a;  logic [192:0] p;
  logic [6:0]   a7; logic [35:0]  p7;

  const_mult u_dut (.a(a), .p(p));
  const_mult #(.WA(7), .WC(29), .C(29'((64'd1 << 29) - 64'd3))) u_29 (.a(a7), .p(p7));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [192:0] c183;
    c183 = (193'(1) << 183) - 193'(1);
    for (int v = 0; v < 1024; v++) begin
      a  = 10'(v);
      a7 = 7'(v);
      #1;
      checks += 2;
      if (p != 193'(a) * c183) begin failures++; $display("FAIL 183: a=%0d", v); end
      if (p7 != 36'(a7) * 36'((64'd1 << 29) - 64'd3)) begin
        failures++; $display("FAIL 29: a=%0d p=%0d", a7, p7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
