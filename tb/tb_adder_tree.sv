// tb_adder_tree: sums random and all-ones operand sets through trees of
// 16, 5 and 1 operands and compares with a sum computed in a loop here.
module tb_adder_tree;

  int checks = 0, failures = 0;

  logic [15:0][11:0] in16; logic [15:0] s16;
  logic [4:0][7:0]   in5;  logic [10:0] s5;
  logic [0:0][9:0]   in1;  logic [9:0]  s1;

  adder_tree #(.N(16), .W(12)) u16 (.in(in16), .sum(s16));
  adder_tree #(.N(5),  .W(8))  u5  (.in(in5),  .sum(s5));
  adder_tree #(.N(1),  .W(10)) u1  (.in(in1),  .sum(s1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned e16, e5;
    for (int t = 0; t < 5000; t++) begin
      e16 = 0; e5 = 0;
      for (int i = 0; i < 16; i++) begin
        in16[i] = (t == 0) ? 12'hfff : 12'($urandom);
        e16 += 32'(in16[i]);
      end
      for (int i = 0; i < 5; i++) begin
        in5[i] = (t == 0) ? 8'hff : 8'($urandom);
        e5 += 32'(in5[i]);
      end
      in1[0] = 10'($urandom);
      #1;
      checks += 3;
      if (s16 != 16'(e16)) begin failures++; $display("FAIL16 %0d vs %0d", s16, e16); end
      if (s5  != 11'(e5))  begin failures++; $display("FAIL5 %0d vs %0d", s5, e5); end
      if (s1  != in1[0])   begin failures++; $display("FAIL1"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
