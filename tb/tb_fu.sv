// tb_fu: self-checking test of the A-block functional unit.
//
// Checks single-step add, subtract (with the fast and the ripple adder) and
// signed compare against values worked
// out in the testbench, the two-step multiplication of the default unit
// (product on y in the second step, busy meanwhile, held while en = 0), and a
// pipelined three-step multiplier that accepts one multiplication per step.
module tb_fu;
  import sast_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  fu_op_e op = FU_NOP, op2 = FU_NOP;
  word_t a = '0, b = '0, a2 = '0, b2 = '0;
  word_t y, y2, y_r;
  logic lt, lt2, busy, busy2, lt_r, busy_r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fu dut (.clk, .rst_n, .en, .op, .a, .b, .y, .lt, .busy);
  fu #(.FAST_ADDER(1'b0)) dut_r (
    .clk, .rst_n, .en, .op, .a, .b, .y(y_r), .lt(lt_r), .busy(busy_r));
  fu #(.MUL_LAT(3), .MUL_PIPELINED(1'b1)) dut_p (
    .clk, .rst_n, .en(1'b1), .op(op2), .a(a2), .b(b2), .y(y2), .lt(lt2), .busy(busy2));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t pa [5], pb [5];
    word_t ea, eb;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // single-step operations
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      a = word_t'($urandom); b = word_t'($urandom);
      if (i % 7 == 0) b = a;
      op = fu_op_e'($urandom_range(1, 4));
      if (op == FU_MUL) op = FU_ADD;
      #1;
      case (op)
        FU_ADD: begin
          check("add", y, word_t'(a + b));
          check("ripple add", y_r, word_t'(a + b));
        end
        FU_SUB: begin
          check("sub", y, word_t'(a - b));
          check("ripple sub", y_r, word_t'(a - b));
        end
        default: begin
          check("lt", y, ($signed(a) < $signed(b)) ? 1 : 0);
          check("lt status", lt, ($signed(a) < $signed(b)) ? 1 : 0);
        end
      endcase
    end
    // two-step multiplication
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      op = FU_MUL; a = word_t'($urandom); b = word_t'($urandom);
      ea = a; eb = b;
      #1 check("busy before issue", busy, 0);
      @(negedge clk);
      op = FU_NOP; a = '0; b = '0;
      #1;
      check("product", y, word_t'(ea * eb));
      check("busy", busy, 1);
      if (i % 5 == 0) begin          // stall holds the product
        en = 1'b0;
        repeat (3) @(negedge clk);
        #1 check("product held", y, word_t'(ea * eb));
        en = 1'b1;
      end
      @(negedge clk);
      #1 check("idle after product", busy, 0);
    end
    // pipelined three-step multiplier, one issue per step
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      op2 = FU_MUL; a2 = word_t'($urandom); b2 = word_t'($urandom);
      pa[i] = a2; pb[i] = b2;
      if (i >= 2) #1 check("pipelined product", y2, word_t'(pa[i-2] * pb[i-2]));
    end
    for (int i = 5; i < 7; i++) begin
      @(negedge clk);
      op2 = FU_NOP;
      #1 check("pipelined product", y2, word_t'(pa[i-2] * pb[i-2]));
    end
    @(negedge clk);
    #1 check("pipeline empty", busy2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
