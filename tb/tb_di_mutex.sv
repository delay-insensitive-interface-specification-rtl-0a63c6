// tb_di_mutex: self-checking testbench for the MUTEX behavioural model.
//
// Phase 1: two clients each run HS four-phase handshakes (rN+, wait gN+,
// hold, rN-, wait gN-) with random think and hold times.
// Phase 2: TIES rounds in which both clients request at the same instant.
// A monitor checks on every grant change that the two grants are never high
// together and that a rising grant answers a pending request. The test
// counts contended requests (the other client already holding) and ties,
// and fails if either never occurred. A watchdog ends a hung run.
module tb_di_mutex;

  localparam int HS   = 200;
  localparam int TIES = 50;

  logic r0, r1, g0, g1;
  int   checks    = 0;
  int   failures  = 0;
  int   done0     = 0;
  int   done1     = 0;
  int   contended = 0;
  int   ties      = 0;

  di_mutex dut (.r0(r0), .r1(r1), .g0(g0), .g1(g1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (r0=%0b r1=%0b g0=%0b g1=%0b)", what, $time, r0, r1, g0, g1);
    end
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(g0 or g1) begin
    check(!(g0 && g1), "grants are mutually exclusive");
  end
  always @(posedge g0) check(r0, "g0 rises only for a pending r0");
  always @(posedge g1) check(r1, "g1 rises only for a pending r1");

  // One four-phase handshake of client id, after a think time of `think`.
  task automatic handshake(input int id, input int think);
    #(think);
    if (id == 0) begin
      r0 = 1'b1;
      if (g1) contended++;
      wait (g0);
      #($urandom_range(1, 20));
      r0 = 1'b0;
      wait (!g0);
      done0++;
    end else begin
      r1 = 1'b1;
      if (g0) contended++;
      wait (g1);
      #($urandom_range(1, 20));
      r1 = 1'b0;
      wait (!g1);
      done1++;
    end
  endtask

  task automatic client(input int id);
    for (int i = 0; i < HS; i++) handshake(id, $urandom_range(1, 20));
  endtask

  // Tie detector: both requests high while neither is granted.
  always @(r0 or r1) begin
    if (r0 && r1 && !g0 && !g1) ties++;
  end

  initial begin : stim
    r0 = 1'b0;
    r1 = 1'b0;
    #5;
    check(!g0 && !g1, "both grants low at start");
    // Phase 1: independent clients with random timing.
    fork
      client(0);
      client(1);
    join
    check(done0 == HS && done1 == HS, "every request of phase 1 was granted");
    // Phase 2: both clients request at the same instant.
    repeat (TIES) begin
      #($urandom_range(1, 20));
      fork
        handshake(0, 0);
        handshake(1, 0);
      join
    end
    #10;
    check(done0 == HS + TIES && done1 == HS + TIES, "every request was granted");
    check(!g0 && !g1, "both grants low at end");
    check(contended > 0, "a request waited for the other grant");
    check(ties >= TIES, "ties between simultaneous requests happened");
    $display("handshakes %0d/%0d, contended %0d, ties %0d", done0, done1, contended, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_di_mutex
