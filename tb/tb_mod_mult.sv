// tb_mod_mult: the default modular multiplier (P = 4051, 12-bit operands) on
// corner and random operand pairs, and a P = 241 instance on every pair;
// expected values come from (a * b) % P.
module tb_mod_mult;

  int checks = 0, failures = 0;

  logic [11:0] a, b, r;
  logic [7:0]  a8, b8, r8;

  mod_mult              u_dut (.a(a),  .b(b),  .r(r));
  mod_mult #(.P(241))   u_241 (.a(a8), .b(b8), .r(r8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      case (t)
        0:       begin a = 12'hfff; b = 12'hfff; end
        1:       begin a = 12'd4050; b = 12'd4050; end
        2:       begin a = 12'd0; b = 12'd1234; end
        3:       begin a = 12'd1; b = 12'd4050; end
        default: begin a = 12'($urandom); b = 12'($urandom); end
      endcase
      #1;
      checks++;
      if (r != 12'((int'(a) * int'(b)) % 4051)) begin
        failures++; $display("FAIL 4051: %0d*%0d -> %0d", a, b, r);
      end
    end
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if (r8 != 8'((x * y) % 241)) begin
          failures++; $display("FAIL 241: %0d*%0d -> %0d", x, y, r8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
