// tb_controller: self-checking test of the microcoded controller.
//
// With the DIFFEQ program loaded at reset, follows a run step by step: the
// control word must equal the program entry of the expected step, the loop
// test must branch back to the loop body while status[0] is 1 and fall
// through to the output steps when it is 0, a stall must hold the step, and
// done must pulse in the last step only. Then loads a short program (jump,
// branch on A-block 2's status, done) and checks its step sequence, and
// checks that nothing is issued while idle.
module tb_controller;
  import sast_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, stall = 1'b0;
  logic [NUM_ABLK-1:0] status = '0;
  logic prog_we = 1'b0;
  logic [UPC_W-1:0] prog_addr = '0;
  uinstr_t prog_data = '0;
  uinstr_t ctrl;
  logic busy, done;
  logic [UPC_W-1:0] upc;
  int checks = 0, failures = 0;
  cstore_t ref_p;

  always #5 clk = ~clk;

  controller dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one step: expect step s, with status and stall as given
  task automatic step(input int s, input logic st0, input logic stl, input logic last);
    @(negedge clk);
    status = {2'b00, st0};
    stall  = stl;
    #1;
    check("busy", busy, 1);
    check("step", upc, s);
    check("control word", (ctrl == ref_p[s]) ? 1 : 0, 1);
    check("done", done, last && !stl);
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uinstr_t w;
    int iters;
    ref_p = diffeq_program();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    #1 check("idle word", (ctrl == '0) ? 1 : 0, 1);
    check("idle", busy, 0);
    for (int run = 0; run < 4; run++) begin
      iters = run + 1;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      #1 check("step 0", upc, 0);
      // steps 0..3 of block I, stall in step 1 on every other run
      for (int s = 0; s < 4; s++) begin
        if (s == 1 && run % 2 == 1) begin
          // step 1 stalled for two cycles
          @(negedge clk);
          stall = 1'b1;
          #1 check("step", upc, 1);
          @(negedge clk) #1 check("held", upc, 1);
          check("control word held", (ctrl == ref_p[1]) ? 1 : 0, 1);
          stall = 1'b0;
        end else if (s > 0) begin
          step(s, 1'b0, 1'b0, 1'b0);
        end else begin
          #1 check("control word", (ctrl == ref_p[0]) ? 1 : 0, 1);
        end
      end
      for (int it = 0; it < iters; it++) begin
        for (int s = DQ_LOOP; s < DQ_TEST; s++) step(s, 1'b0, 1'b0, 1'b0);
        step(DQ_TEST, (it < iters - 1), 1'b0, 1'b0);
      end
      step(DQ_TEST + 1, 1'b0, 1'b0, 1'b0);
      step(DQ_TEST + 2, 1'b0, 1'b0, 1'b1);
      @(negedge clk);
      #1 check("idle after run", busy, 0);
      check("idle word after run", (ctrl == '0) ? 1 : 0, 1);
    end
    // load: 0 jump 6; 6 branch on A-block 2 to 9; 7 done; 9 done
    w = '0; w.seq = SEQ_JUMP; w.target = 5'd6; w.imm = 16'h1111;
    ref_p[0] = w;
    w = '0; w.seq = SEQ_BR_STATUS; w.status_sel = 2'd2; w.target = 5'd9; w.imm = 16'h6666;
    ref_p[6] = w;
    w = '0; w.seq = SEQ_DONE; w.imm = 16'h7777;
    ref_p[7] = w;
    w = '0; w.seq = SEQ_DONE; w.imm = 16'h9999;
    ref_p[9] = w;
    foreach (ref_p[a])
      if (a == 0 || a == 6 || a == 7 || a == 9) begin
        @(negedge clk);
        prog_we = 1'b1; prog_addr = UPC_W'(a); prog_data = ref_p[a];
      end
    @(negedge clk) prog_we = 1'b0;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      #1 check("loaded step 0", ctrl.imm, 16'h1111);
      @(negedge clk);
      status = (run == 0) ? 3'b100 : 3'b011;
      #1 check("jumped", upc, 6);
      check("branch word", ctrl.imm, 16'h6666);
      @(negedge clk);
      #1 check("branch target", upc, (run == 0) ? 9 : 7);
      check("done", done, 1);
      @(negedge clk);
      #1 check("idle", busy, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
