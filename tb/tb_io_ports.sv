// tb_io_ports: self-checking test of the input and output ports.
//
// Random steps read input ports onto buses, with their words sometimes not
// yet offered, and write bus words to output ports. Checks: the drive
// requests, stall exactly when a read port has no word, acknowledge only in
// an enabled step with the word present, and the registered output word and
// its one-cycle valid pulse.
module tb_io_ports;
  import sast_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en;
  bus_tap_t [NUM_IN_PORTS-1:0] rd = '0;
  bus_tap_t [NUM_OUT_PORTS-1:0] wr = '0;
  word_t [NUM_BUS-1:0] bus = '0;
  word_t [NUM_IN_PORTS-1:0] in_data = '0;
  logic [NUM_IN_PORTS-1:0] in_valid = '0;
  logic [NUM_IN_PORTS-1:0] in_ack;
  bus_drv_t [NUM_IN_PORTS-1:0] drv;
  logic stall;
  word_t [NUM_OUT_PORTS-1:0] out_data;
  logic [NUM_OUT_PORTS-1:0] out_valid;
  int checks = 0, failures = 0, n_stall = 0;

  always #5 clk = ~clk;

  // the data path stalls exactly when the ports ask for it
  assign en = !stall;

  io_ports dut (.*);

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
    logic exp_stall;
    word_t exp_out [NUM_OUT_PORTS];
    logic exp_v [NUM_OUT_PORTS];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      bus[0] = word_t'($urandom); bus[1] = word_t'($urandom);
      exp_stall = 1'b0;
      for (int p = 0; p < NUM_IN_PORTS; p++) begin
        in_data[p]  = word_t'($urandom);
        in_valid[p] = ($urandom_range(0, 4) != 0);
        rd[p] = '{en: ($urandom_range(0, 2) == 0), bus: BSEL_W'($urandom_range(0, 1))};
        if (rd[p].en && !in_valid[p]) exp_stall = 1'b1;
      end
      for (int p = 0; p < NUM_OUT_PORTS; p++) begin
        wr[p] = '{en: ($urandom_range(0, 1) == 0), bus: BSEL_W'($urandom_range(0, 1))};
        exp_v[p]   = wr[p].en && !exp_stall;
        exp_out[p] = exp_v[p] ? bus[wr[p].bus] : out_data[p];
      end
      #1;
      check("stall", stall, exp_stall);
      if (exp_stall) n_stall++;
      for (int p = 0; p < NUM_IN_PORTS; p++) begin
        check("drive enable", drv[p].en, rd[p].en);
        if (rd[p].en) begin
          check("drive bus", drv[p].bus, rd[p].bus);
          check("drive word", drv[p].data, in_data[p]);
        end
        check("ack", in_ack[p], rd[p].en && in_valid[p] && !exp_stall);
      end
      @(posedge clk);
      #1;
      for (int p = 0; p < NUM_OUT_PORTS; p++) begin
        check("out valid", out_valid[p], exp_v[p]);
        check("out word", out_data[p], exp_out[p]);
      end
    end
    check("stalls occurred", n_stall > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
