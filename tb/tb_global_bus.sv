// tb_global_bus: self-checking test of the global buses.
//
// Each step gives every bus at most one random driver among all sources
// (some buses idle) and checks that each bus carries its driver's word, or 0
// when idle, with no conflict flagged. With reset held (assertion off) two
// sources then drive one bus and the conflict flag must rise.
module tb_global_bus;
  import sast_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  bus_drv_t [NUM_SRC-1:0] drv = '0;
  word_t [NUM_BUS-1:0] bus;
  logic [NUM_BUS-1:0] conflict;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  global_bus dut (.*);

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
    word_t exp [NUM_BUS];
    int s0, s1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      drv = '0;
      for (int b = 0; b < NUM_BUS; b++) exp[b] = '0;
      s0 = $urandom_range(0, NUM_SRC - 1);
      s1 = $urandom_range(0, NUM_SRC - 1);
      // noise on disabled requests must not reach a bus
      for (int s = 0; s < NUM_SRC; s++) drv[s].data = word_t'($urandom);
      if ($urandom_range(0, 3) != 0) begin
        drv[s0].en = 1'b1; drv[s0].bus = 1'b0; exp[0] = drv[s0].data;
      end
      if ($urandom_range(0, 3) != 0 && s1 != s0) begin
        drv[s1].en = 1'b1; drv[s1].bus = 1'b1; exp[1] = drv[s1].data;
      end
      #1;
      for (int b = 0; b < NUM_BUS; b++) begin
        check("bus word", bus[b], exp[b]);
        check("no conflict", conflict[b], 0);
      end
    end
    @(negedge clk);
    rst_n = 1'b0;
    drv = '0;
    drv[0] = '{en: 1'b1, bus: 1'b1, data: 16'h00F0};
    drv[NUM_SRC-1] = '{en: 1'b1, bus: 1'b1, data: 16'h0000};
    #1;
    check("conflict flagged", conflict[1], 1);
    check("other bus clear", conflict[0], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
