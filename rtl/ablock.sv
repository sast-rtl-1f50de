// ablock: architectural block (A-block) of the structured data path.
//
// An A-block holds a local register file of NREGS words, one functional unit
// and its private wiring; it talks to the rest of the data path only through
// ACCESS_WIDTH access links, each of which can be switched onto any one of the
// NUM_BUS global buses.
//
//   * access link k: when ctrl.link[k].drive is 1 the link's out switches put
//     a register or the FU output on bus ctrl.link[k].bus (a bus drive
//     request on drv[k]); otherwise the link carries the value of that bus
//     into the block.
//   * in switches: register r loads, when ctrl.wr[r].we is 1, either the FU
//     output or the value of one access link. Up to MAX_WRITES registers may
//     load in the same step (an architectural constraint of the design; the
//     limit, 2 by default, is this implementation's and is checked by an
//     assertion).
//   * FU operands: each of the two operands is a register or an access link,
//     so a value arriving over a bus can be used without first being stored.
//
// Timing: everything is combinational within a control step; registers load
// at the clock edge that ends the step, if en is 1 (en = 0 is a stall).
// status is the FU's compare result, sent to the controller; busy is 1 while
// a product is in flight in the FU. regs_q shows the register file.
//
// The block structure (register file, in/out switches, access links, FU
// output looping back to the registers and out to the links) follows the
// design's A-block data path. Implementing the switches as multiplexers
// selected by the control word, rather than as pass gates, is this
// implementation's choice. Because a link may drive the FU output onto a bus
// while an FU operand may come from a bus, there is a structural
// combinational path bus -> FU -> bus; a legal schedule never closes it, and
// the tools may report it as a loop.
module ablock
  import sast_pkg::*;
#(
  parameter int unsigned NREGS         = MAX_REGS,
  parameter int unsigned MUL_LAT       = MUL_LATENCY,
  parameter bit          MUL_PIPELINED = 1'b0,
  parameter bit          FAST_ADDER    = 1'b1,
  parameter int unsigned MAX_WRITES    = MAX_REG_WRITES
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  ablk_ctrl_t                    ctrl,
  input  word_t      [NUM_BUS-1:0]      bus,
  output bus_drv_t   [ACCESS_WIDTH-1:0] drv,
  output logic                          status,
  output word_t      [NREGS-1:0]        regs_q,
  output word_t                         fu_y,
  output logic                          busy
);

  word_t [ACCESS_WIDTH-1:0] link_in;
  word_t                    opa, opb;

  for (genvar k = 0; k < ACCESS_WIDTH; k++) begin : g_link
    assign link_in[k]  = bus[ctrl.link[k].bus];
    assign drv[k].en   = ctrl.link[k].drive;
    assign drv[k].bus  = ctrl.link[k].bus;
    assign drv[k].data = ctrl.link[k].from_fu ? fu_y : regs_q[ctrl.link[k].reg_idx];
  end

  assign opa = ctrl.opa.from_link ? link_in[ctrl.opa.idx] : regs_q[ctrl.opa.idx];
  assign opb = ctrl.opb.from_link ? link_in[ctrl.opb.idx] : regs_q[ctrl.opb.idx];

  fu #(.MUL_LAT(MUL_LAT), .MUL_PIPELINED(MUL_PIPELINED), .FAST_ADDER(FAST_ADDER)) u_fu (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .op   (ctrl.op),
    .a    (opa),
    .b    (opb),
    .y    (fu_y),
    .lt   (status),
    .busy (busy)
  );

  for (genvar r = 0; r < NREGS; r++) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        regs_q[r] <= '0;
      else if (en && ctrl.wr[r].we)
        regs_q[r] <= ctrl.wr[r].from_link ? link_in[ctrl.wr[r].link] : fu_y;
    end
  end

  // the control word may only name registers and links that exist, and may
  // load at most MAX_WRITES registers per step
  always_ff @(posedge clk) begin
    int unsigned nwr;
    if (rst_n && en) begin
      nwr = 0;
      for (int r = 0; r < NREGS; r++) nwr += ctrl.wr[r].we;
      assert (nwr <= MAX_WRITES) else $error("ablock: too many register writes in one step");
      if (ctrl.op != FU_NOP) begin
        assert (ctrl.opa.from_link ? (int'(ctrl.opa.idx) < ACCESS_WIDTH) : (int'(ctrl.opa.idx) < NREGS))
          else $error("ablock: operand a out of range");
        assert (ctrl.opb.from_link ? (int'(ctrl.opb.idx) < ACCESS_WIDTH) : (int'(ctrl.opb.idx) < NREGS))
          else $error("ablock: operand b out of range");
      end
      for (int k = 0; k < ACCESS_WIDTH; k++)
        if (ctrl.link[k].drive && !ctrl.link[k].from_fu)
          assert (int'(ctrl.link[k].reg_idx) < NREGS) else $error("ablock: link source out of range");
      for (int r = NREGS; r < MAX_REGS; r++)
        assert (!ctrl.wr[r].we) else $error("ablock: write to a register that does not exist");
    end
  end

endmodule
