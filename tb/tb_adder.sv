// tb_adder: self-checking test of both adder implementations.
//
// Drives the ripple-carry and the parallel-prefix adder (16 bits, and a
// 5-bit prefix adder to exercise a width that is not a power of two) with
// random and corner-case operands and carry-in, and compares sum and carry
// out with the testbench's own wide addition.
module tb_adder;

  logic [15:0] a, b, s_r, s_f;
  logic        cin, co_r, co_f;
  logic [4:0]  a5, b5, s5;
  logic        co5;
  int checks = 0, failures = 0;

  adder #(.W(16), .FAST(1'b0)) u_ripple (.a, .b, .cin, .s(s_r), .cout(co_r));
  adder #(.W(16), .FAST(1'b1)) u_fast   (.a, .b, .cin, .s(s_f), .cout(co_f));
  adder #(.W(5),  .FAST(1'b1)) u_fast5  (.a(a5), .b(b5), .cin, .s(s5), .cout(co5));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] e;
    logic [5:0]  e5;
    for (int i = 0; i < 3000; i++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      if (i < 4) begin a = 16'hFFFF; b = (i < 2) ? 16'h0000 : 16'hFFFF; cin = i[0]; end
      a5 = 5'($urandom); b5 = 5'($urandom);
      #1;
      e  = {1'b0, a} + {1'b0, b} + 17'(cin);
      e5 = {1'b0, a5} + {1'b0, b5} + 6'(cin);
      check("ripple sum", s_r, e[15:0]);
      check("ripple carry", co_r, e[16]);
      check("prefix sum", s_f, e[15:0]);
      check("prefix carry", co_f, e[16]);
      check("prefix 5-bit sum", s5, e5[4:0]);
      check("prefix 5-bit carry", co5, e5[5]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
