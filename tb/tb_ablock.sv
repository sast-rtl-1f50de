// tb_ablock: self-checking test of one A-block (4 registers, 1 access link,
// 2 global buses).
//
// Random control words load registers from a bus or from the FU, run FU
// operations on registers and on the word arriving over the access link, and
// put registers or the FU output on a bus. A model of the register file in
// the testbench predicts every register, the drive request and the status.
// Multiplications are checked for their two-step timing, and a stalled step
// (en = 0) must change no register.
module tb_ablock;
  import sast_pkg::*;

  localparam int unsigned NR = 4;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  ablk_ctrl_t ctrl = '0;
  word_t [NUM_BUS-1:0] bus = '0;
  bus_drv_t [ACCESS_WIDTH-1:0] drv;
  logic status, busy;
  word_t [NR-1:0] regs_q;
  word_t fu_y;
  int checks = 0, failures = 0;

  word_t m [NR];   // register model

  always #5 clk = ~clk;

  // random control words load any number of registers at once
  ablock #(.NREGS(NR), .MAX_WRITES(NR)) dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic word_t opval(opsel_t s, word_t lk);
    return s.from_link ? lk : m[s.idx];
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t lk, res, pa, pb;
    int b;
    for (int r = 0; r < NR; r++) m[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      ctrl = '0;
      bus[0] = word_t'($urandom); bus[1] = word_t'($urandom);
      b = $urandom_range(0, NUM_BUS - 1);
      lk = bus[b];
      en = ($urandom_range(0, 9) != 0);
      ctrl.op  = fu_op_e'($urandom_range(0, 4));
      if (ctrl.op == FU_MUL) ctrl.op = FU_SUB;
      ctrl.opa = '{from_link: ($urandom_range(0, 3) == 0), idx: '0};
      ctrl.opb = '{from_link: ($urandom_range(0, 3) == 0), idx: '0};
      if (!ctrl.opa.from_link) ctrl.opa.idx = IDX_W'($urandom_range(0, NR - 1));
      if (!ctrl.opb.from_link) ctrl.opb.idx = IDX_W'($urandom_range(0, NR - 1));
      ctrl.link[0].bus   = BSEL_W'(b);
      ctrl.link[0].drive = ($urandom_range(0, 2) == 0);
      if (ctrl.link[0].drive) begin
        // a driven link carries its own word; keep FU operands on registers
        ctrl.opa.from_link = 1'b0; ctrl.opb.from_link = 1'b0;
        ctrl.link[0].from_fu = ($urandom_range(0, 1) == 0);
        ctrl.link[0].reg_idx = IDX_W'($urandom_range(0, NR - 1));
      end
      for (int r = 0; r < NR; r++) begin
        ctrl.wr[r].we        = ($urandom_range(0, 2) == 0);
        ctrl.wr[r].from_link = ($urandom_range(0, 1) == 0) && !ctrl.link[0].drive;
      end
      case (ctrl.op)
        FU_ADD:  res = opval(ctrl.opa, lk) + opval(ctrl.opb, lk);
        FU_SUB:  res = opval(ctrl.opa, lk) - opval(ctrl.opb, lk);
        FU_LT:   res = ($signed(opval(ctrl.opa, lk)) < $signed(opval(ctrl.opb, lk))) ? 1 : 0;
        default: res = '0;
      endcase
      #1;
      check("fu result", fu_y, res);
      check("drive enable", drv[0].en, ctrl.link[0].drive);
      if (ctrl.link[0].drive) begin
        check("drive bus", drv[0].bus, b);
        check("drive data", drv[0].data, ctrl.link[0].from_fu ? res : m[ctrl.link[0].reg_idx]);
      end
      if (ctrl.op == FU_LT) check("status", status, res[0]);
      if (en)
        for (int r = 0; r < NR; r++)
          if (ctrl.wr[r].we) m[r] = ctrl.wr[r].from_link ? lk : res;
      @(posedge clk);
      #1;
      for (int r = 0; r < NR; r++) check("register", regs_q[r], m[r]);
    end
    // two-step multiplication: the product leaves in step 2, onto bus 1 and into R3
    en = 1'b1;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      ctrl = '0;
      ctrl.op = FU_MUL;
      ctrl.opa = R($urandom_range(0, NR - 1));
      ctrl.opb = R($urandom_range(0, NR - 1));
      pa = m[ctrl.opa.idx]; pb = m[ctrl.opb.idx];
      @(negedge clk);
      ctrl = '0;
      ctrl.link[0] = '{drive: 1'b1, bus: 1'b1, from_fu: 1'b1, reg_idx: '0};
      ctrl.wr[3].we = 1'b1;
      #1;
      check("busy in step 2", busy, 1);
      check("product on bus", drv[0].data, word_t'(pa * pb));
      m[3] = pa * pb;
      @(posedge clk);
      #1 check("product stored", regs_q[3], m[3]);
      // refresh the other registers from bus 0
      @(negedge clk);
      ctrl = '0;
      bus[0] = word_t'($urandom);
      ctrl.link[0].bus = '0;
      ctrl.wr[i % 3].we = 1'b1; ctrl.wr[i % 3].from_link = 1'b1;
      m[i % 3] = bus[0];
      @(posedge clk);
      #1 check("register from bus", regs_q[i % 3], m[i % 3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
