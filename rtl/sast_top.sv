// sast_top: the structured-architecture data path with its controller, in the
// DIFFEQ configuration.
//
// Three A-blocks (register files of 6, 5 and 4 words, each with one FU and
// one access link), NUM_GMEM global memories (one by default) and the I/O
// ports share two global buses; a microcoded controller drives every switch and FU and branches on
// the A-blocks' status signals. Nothing is wired point to point between
// A-blocks: every transfer between units is a bus transfer, set up by the
// control word of the step.
//
// Interface: pulse start to run the program in the control store (DIFFEQ
// after reset); busy is 1 while it runs and done pulses in its last step.
// Input port p offers in_data[p] with in_valid[p]; the word is taken when
// in_ack[p] pulses, and a step that needs a word that is not offered waits
// (stall = 1). Output port p presents a word on out_data[p] with a one-cycle
// out_valid[p]. While idle, prog_we/prog_addr/prog_data rewrite one control
// word. bus shows the global buses; bus_conflict flags a bus with two
// drivers, which a correct program never causes. upc is the current control
// step and fu_busy shows the multipliers in flight. Each A-block's register
// file is g_ablk[a].regs.
//
// The tools may report a combinational loop through the buses: an access link
// can put an FU result on a bus while an FU operand comes from a bus. That is
// the switch fabric of the architecture; a program that used both in one
// A-block in one step would close it, and the supplied program does not.
//
// The organisation (A-blocks with local FU and storage, global buses, access
// links, global memory, ports, controller with control and status signals)
// and the DIFFEQ architecture parameters follow the design. Register counts
// per A-block, ports, control-word format and the program are this
// implementation's own.
module sast_top
  import sast_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic                          stall,
  input  word_t   [NUM_IN_PORTS-1:0]    in_data,
  input  logic    [NUM_IN_PORTS-1:0]    in_valid,
  output logic    [NUM_IN_PORTS-1:0]    in_ack,
  output word_t   [NUM_OUT_PORTS-1:0]   out_data,
  output logic    [NUM_OUT_PORTS-1:0]   out_valid,
  input  logic                          prog_we,
  input  logic    [UPC_W-1:0]           prog_addr,
  input  uinstr_t                       prog_data,
  output word_t   [NUM_BUS-1:0]         bus,
  output logic    [NUM_BUS-1:0]         bus_conflict,
  output logic    [UPC_W-1:0]           upc,
  output logic    [NUM_ABLK-1:0]        fu_busy
);

  localparam int unsigned SRC_PORT = NUM_ABLK * ACCESS_WIDTH;
  localparam int unsigned SRC_GMEM = SRC_PORT + NUM_IN_PORTS;
  localparam int unsigned SRC_IMM  = SRC_GMEM + NUM_GMEM;

  uinstr_t                  ctrl;
  logic                     en;
  logic [NUM_ABLK-1:0]      status;
  bus_drv_t [NUM_SRC-1:0]   drv;

  assign en = !stall;

  controller u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .stall    (stall),
    .status   (status),
    .prog_we  (prog_we),
    .prog_addr(prog_addr),
    .prog_data(prog_data),
    .ctrl     (ctrl),
    .busy     (busy),
    .done     (done),
    .upc      (upc)
  );

  for (genvar a = 0; a < NUM_ABLK; a++) begin : g_ablk
    localparam int unsigned NR = ABLK_REGS[a];
    word_t [NR-1:0] regs;
    word_t          fu_y;

    ablock #(.NREGS(NR)) u_ablk (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .ctrl  (ctrl.ablk[a]),
      .bus   (bus),
      .drv   (drv[a*ACCESS_WIDTH +: ACCESS_WIDTH]),
      .status(status[a]),
      .regs_q(regs),
      .fu_y  (fu_y),
      .busy  (fu_busy[a])
    );
  end

  io_ports u_ports (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .rd       (ctrl.in_rd),
    .wr       (ctrl.out_wr),
    .bus      (bus),
    .in_data  (in_data),
    .in_valid (in_valid),
    .in_ack   (in_ack),
    .drv      (drv[SRC_PORT +: NUM_IN_PORTS]),
    .stall    (stall),
    .out_data (out_data),
    .out_valid(out_valid)
  );

  for (genvar m = 0; m < NUM_GMEM; m++) begin : g_gmem
    global_memory u_gmem (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .rd   (ctrl.gm_rd[m]),
      .wr   (ctrl.gm_wr[m]),
      .addr (ctrl.gm_addr[m]),
      .bus  (bus),
      .drv  (drv[SRC_GMEM + m])
    );
  end

  assign drv[SRC_IMM] = '{en: ctrl.imm_drv.en, bus: ctrl.imm_drv.bus, data: ctrl.imm};

  global_bus u_bus (
    .clk     (clk),
    .rst_n   (rst_n),
    .drv     (drv),
    .bus     (bus),
    .conflict(bus_conflict)
  );

endmodule
