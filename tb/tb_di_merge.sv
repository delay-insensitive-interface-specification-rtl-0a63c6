// tb_di_merge: self-checking testbench for the MERGE element.
//
// Two instances are tested:
//  * the default XOR realisation in the general two-phase environment: each
//    step toggles a or b (chosen at random) and c must toggle exactly once;
//  * the OR realisation in the restricted environment, where each chosen
//    input makes a full up/down pair: c must rise with it and fall with it.
// Expected values come from counting transitions in the testbench, not from
// a copy of the gate equation. A watchdog ends a hung run with a failure.
module tb_di_merge;
  import di_pkg::*;

  logic xa, xb, xc;   // XOR instance
  logic oa, ob, oc;   // OR instance
  logic exp_c;
  int   checks   = 0;
  int   failures = 0;
  int   n_a      = 0;
  int   n_b      = 0;

  di_merge                          dut_xor (.a(xa), .b(xb), .c(xc));
  di_merge #(.IMPL(MERGE_OR))       dut_or  (.a(oa), .b(ob), .c(oc));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    xa = 1'b0; xb = 1'b0;
    oa = 1'b0; ob = 1'b0;
    exp_c = 1'b0;
    #5;
    check(xc, 1'b0, "XOR rest");
    check(oc, 1'b0, "OR rest");

    // General environment: E = any {c:a};E or {c:b};E.
    repeat (200) begin
      #($urandom_range(1, 10));
      if ($urandom_range(1) == 0) begin xa = ~xa; n_a++; end
      else                        begin xb = ~xb; n_b++; end
      exp_c = ~exp_c;             // one transition per input transition
      #1;
      check(xc, exp_c, "XOR merge toggles once per input transition");
    end
    if (n_a == 0 || n_b == 0) begin
      failures++;
      $display("FAIL one of the XOR inputs was never used");
    end

    // Restricted environment: each input makes a full up/down pair.
    repeat (100) begin
      logic use_a;
      use_a = 1'($urandom_range(1));
      #($urandom_range(1, 10));
      if (use_a) oa = 1'b1; else ob = 1'b1;
      #1;
      check(oc, 1'b1, "OR merge rises with the request");
      #($urandom_range(1, 10));
      if (use_a) oa = 1'b0; else ob = 1'b0;
      #1;
      check(oc, 1'b0, "OR merge falls with the request");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_di_merge
