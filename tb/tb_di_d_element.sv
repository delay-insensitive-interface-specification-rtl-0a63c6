// tb_di_d_element: self-checking testbench for Martin's D element.
//
// After reset the testbench acts as the element's environment: it raises
// the left request, and answers each right request with a right
// acknowledge, with random gaps. At every step it checks the element's
// outputs against the expected handshake sequence
//     ar+ -> ak+,  ar- -> br+,  bk+ -> br-,  bk- -> ak-
// and, during each gap, that no output moves early. It also checks the
// internal state signal csc0 (1 at rest, 0 from ar+ until bk+).
// A watchdog ends a hung run with a failure.
module tb_di_d_element;

  logic rst, ar, ak, br, bk, csc0;
  int   checks   = 0;
  int   failures = 0;

  di_d_element dut (.rst(rst), .ar(ar), .ak(ak), .br(br), .bk(bk), .csc0(csc0));

  task automatic expect3(input logic e_ak, input logic e_br, input logic e_csc,
                         input string what);
    checks++;
    if (ak !== e_ak || br !== e_br || csc0 !== e_csc) begin
      failures++;
      $display("FAIL %s: ak=%0b br=%0b csc0=%0b expected %0b %0b %0b at %0t",
               what, ak, br, csc0, e_ak, e_br, e_csc, $time);
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
    rst = 1'b1;
    ar  = 1'b0;
    bk  = 1'b0;
    #5;
    rst = 1'b0;
    #5;
    expect3(1'b0, 1'b0, 1'b1, "rest state after reset");

    repeat (100) begin
      // Left request.
      #($urandom_range(1, 15));
      ar = 1'b1; #1;
      expect3(1'b1, 1'b0, 1'b0, "ar+ gives ak+");
      #($urandom_range(1, 15));
      expect3(1'b1, 1'b0, 1'b0, "steady while ar high");
      // Left release starts the right handshake.
      ar = 1'b0; #1;
      expect3(1'b1, 1'b1, 1'b0, "ar- gives br+");
      #($urandom_range(1, 15));
      expect3(1'b1, 1'b1, 1'b0, "steady while waiting for bk+");
      bk = 1'b1; #1;
      expect3(1'b1, 1'b0, 1'b1, "bk+ gives br-");
      #($urandom_range(1, 15));
      expect3(1'b1, 1'b0, 1'b1, "steady while waiting for bk-");
      bk = 1'b0; #1;
      expect3(1'b0, 1'b0, 1'b1, "bk- gives ak-");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_di_d_element
