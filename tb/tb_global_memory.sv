// tb_global_memory: self-checking test of the global memory.
//
// Random steps write the word on a random bus to a random address and/or
// read a random address onto the other bus; a model array predicts every
// read. Writes in stalled steps (en = 0) must be dropped.
module tb_global_memory;
  import sast_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  bus_tap_t rd = '0, wr = '0;
  logic [GADDR_W-1:0] addr = '0;
  word_t [NUM_BUS-1:0] bus = '0;
  bus_drv_t drv;
  int checks = 0, failures = 0;
  word_t m [GMEM_DEPTH];

  always #5 clk = ~clk;

  global_memory dut (.*);

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
    int b;
    for (int i = 0; i < GMEM_DEPTH; i++) m[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      b = $urandom_range(0, 1);
      bus[0] = word_t'($urandom); bus[1] = word_t'($urandom);
      addr = GADDR_W'($urandom);
      en = ($urandom_range(0, 7) != 0);
      wr = '{en: ($urandom_range(0, 1) == 1), bus: BSEL_W'(b)};
      rd = '{en: ($urandom_range(0, 1) == 1), bus: BSEL_W'(1 - b)};
      #1;
      check("drive enable", drv.en, rd.en);
      if (rd.en) begin
        check("drive bus", drv.bus, 1 - b);
        check("read word", drv.data, m[addr]);
      end
      if (en && wr.en) m[addr] = bus[b];
    end
    @(negedge clk);
    wr = '0; rd = '0;
    for (int i = 0; i < GMEM_DEPTH; i++) begin
      addr = GADDR_W'(i);
      #1 check("final contents", drv.data, m[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
