// tb_lut_term: checks every entry of four lut_term tables, one of each kind
// of term, against values worked out here with plain integer arithmetic.
module tb_lut_term;
  import arith_pkg::*;

  int checks = 0, failures = 0;
  int exp_mm;

  logic [4:0]  x5;
  logic [5:0]  x6;
  logic [7:0]  y_red;
  logic [15:0] y_divq;
  logic [9:0]  y_mm;
  logic [39:0] y_cm;
  logic [3:0]  y_divr;

  // (x * 2^10) mod 241
  lut_term #(.OP(TERM_MODRED), .KIN(5), .OW(8),  .SHIFT(10), .K(wide_t'(241)))
    u_red  (.x(x5), .y(y_red));
  // floor(x * 2^7 / 13) and (x * 2^7) mod 13
  lut_term #(.OP(TERM_DIVQ),   .KIN(5), .OW(16), .SHIFT(7),  .K(wide_t'(13)))
    u_divq (.x(x5), .y(y_divq));
  lut_term #(.OP(TERM_DIVR),   .KIN(5), .OW(4),  .SHIFT(7),  .K(wide_t'(13)))
    u_divr (.x(x5), .y(y_divr));
  // (a * b * 2^6) mod 997, x = {b, a}, 3-bit a and b
  lut_term #(.OP(TERM_MODMUL), .KIN(6), .KLO(3), .OW(10), .SHIFT(6), .K(wide_t'(997)))
    u_mm   (.x(x6), .y(y_mm));
  // x * (2^29 - 3) * 2^5
  lut_term #(.OP(TERM_CMUL),   .KIN(5), .OW(40), .SHIFT(5), .K(wide_t'(64'd536870909)))
    u_cm   (.x(x5), .y(y_cm));   // 536870909 = 2^29 - 3

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 32; e++) begin
      x5 = 5'(e);
      #1;
      check("modred", longint'(y_red),  (longint'(e) * 1024) % 241);
      check("divq",   longint'(y_divq), (longint'(e) * 128) / 13);
      check("divr",   longint'(y_divr), (longint'(e) * 128) % 13);
      check("cmul",   longint'(y_cm),   longint'(e) * ((64'sd1 << 29) - 3) * 32);
    end
    for (int e = 0; e < 64; e++) begin
      x6 = 6'(e);
      #1;
      exp_mm = ((e % 8) * (e / 8) * 64) % 997;
      check("modmul", longint'(y_mm), longint'(exp_mm));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
