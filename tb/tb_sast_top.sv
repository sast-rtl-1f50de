// tb_sast_top: end-to-end test of the structured data path running DIFFEQ.
//
// Runs the DIFFEQ program on random inputs and compares the three results
// with a reference model of the loop in W-bit two's-complement arithmetic.
// Checks the run time: 4 input steps, 7 steps per loop iteration and 2
// output steps, plus one cycle per cycle of input stall. Some runs offer
// their input words late so that the data path stalls. A final run loads a
// short program into the control store that stores a word in the global
// memory and reads it back to an output port. One run loops 300 times to
// check that the loop keeps its 7-step rate over a long run.
//
// Mechanisms counted (each must occur): stall, loop branch taken, loop exit,
// two-step multiplication, transfers on each bus, an FU result sent straight
// to a bus, a bus word used directly as an FU operand, immediate on a bus,
// global-memory write and read, control-store load.
module tb_sast_top;
  import sast_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic busy, done, stall;
  word_t [NUM_IN_PORTS-1:0] in_data;
  logic  [NUM_IN_PORTS-1:0] in_valid;
  logic  [NUM_IN_PORTS-1:0] in_ack;
  word_t [NUM_OUT_PORTS-1:0] out_data;
  logic  [NUM_OUT_PORTS-1:0] out_valid;
  logic prog_we = 1'b0;
  logic [UPC_W-1:0] prog_addr = '0;
  uinstr_t prog_data = '0;
  word_t [NUM_BUS-1:0] bus;
  logic  [NUM_BUS-1:0] bus_conflict;
  logic  [UPC_W-1:0] upc;
  logic  [NUM_ABLK-1:0] fu_busy;

  int checks = 0, failures = 0;
  int n_stall = 0, n_taken = 0, n_exit = 0, n_mul = 0, n_fu2bus = 0, n_linkop = 0;
  int n_imm = 0, n_gm_wr = 0, n_gm_rd = 0, n_load = 0, n_conflict = 0;
  int n_bus [NUM_BUS];

  always #5 clk = ~clk;

  sast_top dut (.*);

  // input queues, one per port, and a delay before each word is offered
  word_t q_in [NUM_IN_PORTS][$];
  int    hold [NUM_IN_PORTS];
  word_t q_out [NUM_OUT_PORTS][$];

  // offered words change only at the falling edge
  always @(negedge clk)
    for (int p = 0; p < NUM_IN_PORTS; p++) begin
      in_valid[p] <= (q_in[p].size() > 0) && (hold[p] == 0);
      in_data[p]  <= (q_in[p].size() > 0) ? q_in[p][0] : '0;
    end

  always @(posedge clk) begin
    for (int p = 0; p < NUM_IN_PORTS; p++) begin
      if (in_ack[p]) void'(q_in[p].pop_front());
      else if (hold[p] > 0) hold[p] <= hold[p] - 1;
    end
    for (int p = 0; p < NUM_OUT_PORTS; p++)
      if (out_valid[p]) q_out[p].push_back(out_data[p]);
    // mechanism counters
    if (busy) begin
      if (stall) n_stall++;
      if (!stall) begin
        if (dut.ctrl.seq == SEQ_BR_STATUS) begin
          if (dut.status[dut.ctrl.status_sel]) n_taken++; else n_exit++;
        end
        for (int a = 0; a < NUM_ABLK; a++) begin
          if (dut.ctrl.ablk[a].op == FU_MUL) n_mul++;
          if (dut.ctrl.ablk[a].link[0].drive && dut.ctrl.ablk[a].link[0].from_fu) n_fu2bus++;
          if (dut.ctrl.ablk[a].op != FU_NOP &&
              (dut.ctrl.ablk[a].opa.from_link || dut.ctrl.ablk[a].opb.from_link)) n_linkop++;
        end
        for (int b = 0; b < NUM_BUS; b++)
          for (int s = 0; s < NUM_SRC; s++)
            if (dut.drv[s].en && int'(dut.drv[s].bus) == b) n_bus[b]++;
        if (dut.ctrl.imm_drv.en) n_imm++;
        if (dut.ctrl.gm_wr[0].en) n_gm_wr++;
        if (dut.ctrl.gm_rd[0].en) n_gm_rd++;
      end
    end
    if (rst_n && bus_conflict != '0) n_conflict++;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one DIFFEQ run; late = cycles each input word is held back
  task automatic run_diffeq(input word_t x0, y0, u0, dx, a, input int late);
    word_t x, y, u, x1, y1, u1;
    int iters, cycles;
    x = x0; y = y0; u = u0; iters = 0;
    do begin
      x1 = x + dx;
      u1 = u - word_t'(word_t'(word_t'(3) * x) * word_t'(u * dx)) - word_t'(word_t'(word_t'(3) * y) * dx);
      y1 = y + word_t'(u * dx);
      x = x1; u = u1; y = y1;
      iters++;
    end while ($signed(x) < $signed(a));
    q_in[0] = '{dx, y0};
    q_in[1] = '{x0, u0};
    q_in[2] = '{a};
    for (int p = 0; p < NUM_IN_PORTS; p++) hold[p] = late;
    q_out[0] = {}; q_out[1] = {};
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
      if (cycles > 100000) break;
    end
    @(negedge clk);
    @(negedge clk);
    check("output port 0 count", q_out[0].size(), 2);
    check("output port 1 count", q_out[1].size(), 1);
    if (q_out[0].size() == 2 && q_out[1].size() == 1) begin
      check("x", q_out[0][0], x);
      check("u", q_out[0][1], u);
      check("y", q_out[1][0], y);
    end
    if (late == 0) check("run cycles", cycles, 4 + 7 * iters + 2);
    else check("run cycles >= stall-free", cycles >= 4 + 7 * iters + 2, 1);
    check("inputs consumed", q_in[0].size() + q_in[1].size() + q_in[2].size(), 0);
  endtask

  task automatic load(input int addr, input uinstr_t w);
    @(negedge clk);
    prog_we = 1'b1; prog_addr = UPC_W'(addr); prog_data = w;
    @(negedge clk);
    prog_we = 1'b0;
    n_load++;
  endtask

  // store port-0 word at address 5, read it back, send it to output port 1
  task automatic run_memory(input word_t v);
    uinstr_t w;
    int cycles;
    w = '0; w = port_in(w, 0, 1); w.gm_wr[0] = '{en: 1'b1, bus: 1'b1}; w.gm_addr[0] = 5;
    load(0, w);
    w = '0; w.gm_rd[0] = '{en: 1'b1, bus: 1'b0}; w.gm_addr[0] = 5; w = listen(w, 1, 0, 4);
    load(1, w);
    w = '0; w = drive(w, 1, 1, 4); w = port_out(w, 1, 1); w.seq = SEQ_DONE;
    load(2, w);
    q_in[0] = '{v}; hold[0] = 0;
    q_out[0] = {}; q_out[1] = {};
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done && cycles < 1000) begin @(negedge clk); cycles++; end
    @(negedge clk); @(negedge clk);
    check("memory program cycles", cycles, 3);
    check("memory word out", (q_out[1].size() == 1) ? q_out[1][0] : -1, v);
    check("memory word in A1.R4", dut.g_ablk[1].regs[4], v);
    check("memory contents", dut.g_gmem[0].u_gmem.mem[5], v);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t x0, dx, a;
    in_valid = '0;
    in_data  = '0;
    for (int b = 0; b < NUM_BUS; b++) n_bus[b] = 0;
    for (int p = 0; p < NUM_IN_PORTS; p++) hold[p] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // fixed case: x=0, dx=1, a=3 -> three iterations
    run_diffeq(16'd0, 16'd2, 16'd5, 16'd1, 16'd3, 0);
    // long run: 300 iterations back to back
    run_diffeq(16'd0, 16'd5, 16'd7, 16'd1, 16'd300, 0);
    // a <= x: body runs once, loop exits
    run_diffeq(16'd10, 16'd7, 16'd1, 16'd2, 16'd4, 0);
    for (int i = 0; i < 40; i++) begin
      x0 = word_t'($urandom_range(0, 100));
      dx = word_t'($urandom_range(1, 9));
      a  = x0 + word_t'($urandom_range(0, 60));
      run_diffeq(x0, word_t'($urandom), word_t'($urandom), dx, a, (i % 4 == 3) ? 3 : 0);
    end
    run_memory(16'hBEEF);
    // reset restores the DIFFEQ program
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_diffeq(16'd1, 16'd1, 16'd1, 16'd1, 16'd2, 0);

    check("stall seen", n_stall > 0, 1);
    check("branch taken seen", n_taken > 0, 1);
    check("loop exit seen", n_exit > 0, 1);
    check("multiplication seen", n_mul > 0, 1);
    check("FU result to bus seen", n_fu2bus > 0, 1);
    check("bus operand seen", n_linkop > 0, 1);
    check("immediate seen", n_imm > 0, 1);
    check("global memory write seen", n_gm_wr > 0, 1);
    check("global memory read seen", n_gm_rd > 0, 1);
    check("control store load seen", n_load > 0, 1);
    for (int b = 0; b < NUM_BUS; b++) check("bus used", n_bus[b] > 0, 1);
    check("bus conflicts", n_conflict, 0);
    $display("mechanisms: stall=%0d taken=%0d exit=%0d mul=%0d fu2bus=%0d linkop=%0d imm=%0d gmwr=%0d gmrd=%0d load=%0d bus0=%0d bus1=%0d",
             n_stall, n_taken, n_exit, n_mul, n_fu2bus, n_linkop, n_imm, n_gm_wr, n_gm_rd, n_load,
             n_bus[0], n_bus[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
