// tb_di_join: self-checking testbench for the JOIN element (C-element).
//
// Part 1 drives random single and double input changes and compares c with
// a reference state machine: c takes the inputs' value when they agree and
// holds it otherwise.
// Part 2 plays the element's intended two-phase environment: toggle a and b
// in random order with random gaps, check that c does not move after the
// first toggle, and that it toggles exactly once after the second.
// A watchdog ends the run with a failure if it hangs.
module tb_di_join;

  logic a, b, c;
  logic c_ref;
  int   checks   = 0;
  int   failures = 0;

  di_join dut (.a(a), .b(b), .c(c));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (a=%0b b=%0b) at %0t", what, got, exp, a, b, $time);
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
    a = 1'b0;
    b = 1'b0;
    c_ref = 1'b0;
    #5;
    check(c, 1'b0, "initial value with a=b=0");

    // Part 1: arbitrary level changes against the reference model.
    repeat (400) begin
      case ($urandom_range(2))
        0: a = ~a;
        1: b = ~b;
        default: begin a = ~a; b = ~b; end
      endcase
      if (a == b) c_ref = a;
      #3;
      check(c, c_ref, "level reference");
    end

    // Return to the rest state.
    a = 1'b0; b = 1'b0; #3;
    check(c, 1'b0, "rest state");

    // Part 2: two-phase JOIN environment.
    repeat (100) begin : env_cycle
      logic c_before;
      logic first_is_a;
      c_before   = c;
      first_is_a = 1'($urandom_range(1));
      #($urandom_range(1, 20));
      if (first_is_a) a = ~a; else b = ~b;
      #($urandom_range(1, 20));
      check(c, c_before, "c holds after only one input transition");
      if (first_is_a) b = ~b; else a = ~a;
      #2;
      check(c, ~c_before, "c toggles after both input transitions");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_di_join
