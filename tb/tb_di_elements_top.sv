// tb_di_elements_top: end-to-end testbench for the element library top.
//
// The top has no parameters, so this bench runs it as built. Four
// environments run concurrently, one per element, each the intended
// environment of that element:
//  * D element: left requests answered by right acknowledges; the full
//    sequence ar+ ak+ ar- br+ bk+ br- bk- ak- is checked step by step.
//  * JOIN: a and b toggled in random order; c must hold after the first
//    and toggle after the second.
//  * MERGE: a or b toggled at random; c must toggle once per transition.
//  * MUTEX: two four-phase clients, random timing plus forced ties; grants
//    must be exclusive and every request served.
// Each mechanism is counted (D-element nested handshakes, JOIN holds and
// fires, MERGE transitions from each input, MUTEX waits and ties); one that
// never happened counts as a failure. A watchdog ends a hung run.
module tb_di_elements_top;

  localparam int N = 100;

  logic d_rst, d_ar, d_ak, d_br, d_bk, d_csc0;
  logic j_a, j_b, j_c;
  logic m_a, m_b, m_c;
  logic x_r0, x_r1, x_g0, x_g1;

  int checks   = 0;
  int failures = 0;
  int n_d_cycles = 0, n_join_hold = 0, n_join_fire = 0;
  int n_merge_a = 0, n_merge_b = 0;
  int n_mutex_wait = 0, n_mutex_tie = 0, n_mutex_done = 0;

  di_elements_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #5000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- D element environment ----------------
  task automatic run_d();
    for (int i = 0; i < N; i++) begin
      #($urandom_range(1, 15));
      d_ar = 1'b1; #1;
      check(d_ak && !d_br, "D: ar+ -> ak+");
      #($urandom_range(1, 15));
      d_ar = 1'b0; #1;
      check(d_ak && d_br, "D: ar- -> br+ with ak still high");
      #($urandom_range(1, 15));
      d_bk = 1'b1; #1;
      check(d_ak && !d_br, "D: bk+ -> br-");
      #($urandom_range(1, 15));
      d_bk = 1'b0; #1;
      check(!d_ak && !d_br, "D: bk- -> ak-");
      n_d_cycles++;
    end
  endtask

  // ---------------- JOIN environment ----------------
  task automatic run_join();
    for (int i = 0; i < N; i++) begin
      logic c0;
      logic first_a;
      c0 = j_c;
      first_a = 1'($urandom_range(1));
      #($urandom_range(1, 15));
      if (first_a) j_a = ~j_a; else j_b = ~j_b;
      #($urandom_range(1, 15));
      check(j_c == c0, "JOIN: holds after one input");
      n_join_hold++;
      if (first_a) j_b = ~j_b; else j_a = ~j_a;
      #1;
      check(j_c == ~c0, "JOIN: fires after both inputs");
      n_join_fire++;
    end
  endtask

  // ---------------- MERGE environment ----------------
  task automatic run_merge();
    logic exp_c;
    exp_c = m_c;
    for (int i = 0; i < 2 * N; i++) begin
      #($urandom_range(1, 10));
      if ($urandom_range(1) == 0) begin m_a = ~m_a; n_merge_a++; end
      else                        begin m_b = ~m_b; n_merge_b++; end
      exp_c = ~exp_c;
      #1;
      check(m_c == exp_c, "MERGE: one output transition per input transition");
    end
  endtask

  // ---------------- MUTEX environment ----------------
  always @(x_g0 or x_g1) check(!(x_g0 && x_g1), "MUTEX: grants exclusive");
  always @(x_r0 or x_r1) if (x_r0 && x_r1 && !x_g0 && !x_g1) n_mutex_tie++;

  task automatic mutex_hs(input int id, input int think);
    #(think);
    if (id == 0) begin
      x_r0 = 1'b1;
      if (x_g1) n_mutex_wait++;
      wait (x_g0);
      #($urandom_range(1, 15));
      x_r0 = 1'b0;
      wait (!x_g0);
    end else begin
      x_r1 = 1'b1;
      if (x_g0) n_mutex_wait++;
      wait (x_g1);
      #($urandom_range(1, 15));
      x_r1 = 1'b0;
      wait (!x_g1);
    end
    n_mutex_done++;
  endtask

  task automatic run_mutex();
    fork
      for (int i = 0; i < N; i++) mutex_hs(0, $urandom_range(1, 15));
      for (int i = 0; i < N; i++) mutex_hs(1, $urandom_range(1, 15));
    join
    for (int i = 0; i < N / 4; i++) begin
      fork
        mutex_hs(0, 1);
        mutex_hs(1, 1);
      join
    end
  endtask

  initial begin : stim
    d_rst = 1'b1; d_ar = 1'b0; d_bk = 1'b0;
    j_a = 1'b0; j_b = 1'b0;
    m_a = 1'b0; m_b = 1'b0;
    x_r0 = 1'b0; x_r1 = 1'b0;
    #5;
    d_rst = 1'b0;
    #5;
    check(!d_ak && !d_br && d_csc0, "D: rest state after reset");
    check(!j_c, "JOIN: rest state");
    check(!m_c, "MERGE: rest state");
    check(!x_g0 && !x_g1, "MUTEX: rest state");

    fork
      run_d();
      run_join();
      run_merge();
      run_mutex();
    join

    #10;
    check(n_mutex_done == 2 * N + 2 * (N / 4), "MUTEX: every request served");
    check(n_d_cycles   > 0, "mechanism: D-element nested handshake");
    check(n_join_hold  > 0, "mechanism: JOIN waits for second input");
    check(n_join_fire  > 0, "mechanism: JOIN fires");
    check(n_merge_a    > 0, "mechanism: MERGE passes a transition of a");
    check(n_merge_b    > 0, "mechanism: MERGE passes a transition of b");
    check(n_mutex_wait > 0, "mechanism: MUTEX request waits for the other grant");
    check(n_mutex_tie  > 0, "mechanism: MUTEX resolves simultaneous requests");
    $display("D cycles %0d, JOIN hold/fire %0d/%0d, MERGE a/b %0d/%0d, MUTEX wait/tie/done %0d/%0d/%0d",
             n_d_cycles, n_join_hold, n_join_fire, n_merge_a, n_merge_b,
             n_mutex_wait, n_mutex_tie, n_mutex_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_di_elements_top
