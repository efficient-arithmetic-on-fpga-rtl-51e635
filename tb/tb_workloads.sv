// tb_workloads: every operator configuration of the evaluation, each built as
// its own instance by overriding parameters, and checked against the same
// operation written with SystemVerilog's *, / and % operators:
//   - constant multiplication by 2^29-3, 2^157-7 and 2^183-1, with 7- and
//     10-bit variables (every variable value);
//   - modular multiplication for P = 241, 491, 997, 2011, 4051;
//   - modular reduction of 168- and 270-bit operands for the same five moduli;
//   - division of 16-, 32-, 48- and 64-bit dividends by
//     5, 11, 13, 23, 47, 113 and 241.
// Every configuration is built twice: once for 5-input tables (sub-vector
// width M = 5; M = 2 for the two-operand tables of modular multiplication,
// which then have 4 inputs) and once for 6-input tables (M = 6; M = 3).
// The values of the non-special constants used in the evaluation are not
// known, so they are not covered.
module tb_workloads;

  localparam int unsigned NSTEP = 1024;   // vectors per instance

  int checks = 0, failures = 0;

  localparam int unsigned MODS [5]  = '{241, 491, 997, 2011, 4051};
  localparam int unsigned DIVS [7]  = '{5, 11, 13, 23, 47, 113, 241};
  localparam int unsigned DWID [4]  = '{16, 32, 48, 64};
  localparam int unsigned RWID [2]  = '{168, 270};
  localparam int unsigned CWID [3]  = '{29, 157, 183};
  localparam int unsigned CSUB [3]  = '{3, 7, 1};
  localparam int unsigned VWID [2]  = '{7, 10};
  localparam int unsigned MSGL [2]  = '{5, 6};   // single-operand tables
  localparam int unsigned MPAIR[2]  = '{2, 3};   // modular multiplication

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar mp = 0; mp < 2; mp++) begin : g_map
    // ---- constant multiplication -----------------------------------------
    for (genvar ci = 0; ci < 3; ci++) begin : g_cm
      for (genvar vi = 0; vi < 2; vi++) begin : g_v
        localparam int unsigned WC = CWID[ci];
        localparam int unsigned WA = VWID[vi];
        localparam logic [WC-1:0] C = WC'((200'(1) << WC) - 200'(CSUB[ci]));
        logic [WA-1:0]    a;
        logic [WA+WC-1:0] p;
        const_mult #(.WA(WA), .WC(WC), .C(C), .M(MSGL[mp])) u (.a(a), .p(p));
        initial begin
          for (int t = 0; t < NSTEP; t++) begin
            a = WA'(t);
            #1;
            checks++;
            if (p != (WA+WC)'(a) * (WA+WC)'(C)) begin
              failures++; $display("FAIL M=%0d cmul WC=%0d WA=%0d a=%0d", MSGL[mp], WC, WA, a);
            end
          end
        end
      end
    end

    // ---- modular multiplication ------------------------------------------
    for (genvar mi = 0; mi < 5; mi++) begin : g_mm
      localparam int unsigned P  = MODS[mi];
      localparam int unsigned NB = $clog2(P);
      logic [NB-1:0] a, b, r;
      mod_mult #(.P(P), .M(MPAIR[mp])) u (.a(a), .b(b), .r(r));
      initial begin
        for (int t = 0; t < NSTEP; t++) begin
          a = (t == 0) ? '1 : NB'($urandom);
          b = (t == 0) ? '1 : NB'($urandom);
          #1;
          checks++;
          if (r != NB'((longint'(a) * longint'(b)) % longint'(P))) begin
            failures++; $display("FAIL mmul P=%0d %0d*%0d -> %0d", P, a, b, r);
          end
        end
      end
    end

    // ---- modular reduction -----------------------------------------------
    for (genvar wi = 0; wi < 2; wi++) begin : g_mr
      for (genvar mi = 0; mi < 5; mi++) begin : g_p
        localparam int unsigned WA = RWID[wi];
        localparam int unsigned P  = MODS[mi];
        localparam int unsigned PW = $clog2(P);
        logic [WA-1:0] a;
        logic [PW-1:0] r;
        mod_reduce #(.WA(WA), .P(P), .M(MSGL[mp])) u (.a(a), .r(r));
        initial begin
          for (int t = 0; t < NSTEP; t++) begin
            for (int w = 0; w < 10; w++) a = WA'({a, 30'($urandom)});
            if (t == 0) a = '1;
            else if (t % 4 == 1) a = a >> ($urandom % WA);
            #1;
            checks++;
            if (r != PW'(a % WA'(P))) begin
              failures++; $display("FAIL mred WA=%0d P=%0d t=%0d", WA, P, t);
            end
          end
        end
      end
    end

    // ---- division by a constant ------------------------------------------
    for (genvar wi = 0; wi < 4; wi++) begin : g_dv
      for (genvar di = 0; di < 7; di++) begin : g_d
        localparam int unsigned WA = DWID[wi];
        localparam int unsigned D  = DIVS[di];
        localparam int unsigned DW = $clog2(D);
        logic [WA-1:0] a, q;
        logic [DW-1:0] r;
        const_div #(.WA(WA), .D(D), .M(MSGL[mp])) u (.a(a), .q(q), .r(r));
        initial begin
          for (int t = 0; t < NSTEP; t++) begin
            a = WA'({32'($urandom), 32'($urandom)});
            if (t == 0) a = '1;
            else if (t % 4 == 1) a = a >> ($urandom % WA);
            #1;
            checks++;
            if (q != a / WA'(D) || r != DW'(a % WA'(D))) begin
              failures++; $display("FAIL div WA=%0d D=%0d a=%0d q=%0d r=%0d", WA, D, a, q, r);
            end
          end
        end
      end
    end
  end

  initial begin
    #(NSTEP + 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
