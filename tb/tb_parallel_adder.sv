// tb_parallel_adder: compares the carry-select adder with the + operator for
// random and corner operands at an even, an odd and a one-bit width, and
// counts how often the upper half took the carry-in-1 sum.
module tb_parallel_adder;

  int checks = 0, failures = 0, carries = 0;

  logic [15:0] a16, b16; logic [16:0] s16;
  logic [6:0]  a7,  b7;  logic [7:0]  s7;
  logic        a1,  b1;  logic [1:0]  s1;

  parallel_adder #(.W(16)) u16 (.a(a16), .b(b16), .s(s16));
  parallel_adder #(.W(7))  u7  (.a(a7),  .b(b7),  .s(s7));
  parallel_adder #(.W(1))  u1  (.a(a1),  .b(b1),  .s(s1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      case (i)
        0:       begin a16 = 16'hffff; b16 = 16'hffff; end
        1:       begin a16 = 16'h00ff; b16 = 16'h0001; end
        2:       begin a16 = 16'h0000; b16 = 16'h0000; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); end
      endcase
      a7 = 7'($urandom); b7 = 7'($urandom);
      a1 = 1'($urandom); b1 = 1'($urandom);
      #1;
      if ({1'b0, a16[7:0]} + {1'b0, b16[7:0]} > 9'd255) carries++;
      checks += 3;
      if (s16 != 17'(a16) + 17'(b16)) begin failures++; $display("FAIL16 %h+%h=%h", a16, b16, s16); end
      if (s7  != 8'(a7) + 8'(b7))     begin failures++; $display("FAIL7 %h+%h=%h", a7, b7, s7); end
      if (s1  != 2'(a1) + 2'(b1))     begin failures++; $display("FAIL1 %h+%h=%h", a1, b1, s1); end
    end
    checks++;
    if (carries == 0) begin failures++; $display("carry select never exercised"); end
    $display("carry-in-1 upper half selected %0d times", carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
