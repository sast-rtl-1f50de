// sast_pkg: configuration, control-word types and the default microprogram of
// a structured-architecture (SA) data path.
//
// The SA data path is a row of architectural blocks (A-blocks), each with its
// own functional unit (FU) and register file, joined only through a small
// number of global buses. Every A-block reaches the buses through a fixed
// number of access links; a global memory and the I/O ports hang on the same
// buses. A microcoded controller issues one control word per control step.
//
// The default configuration is the DIFFEQ data path: 3 A-blocks, 2 global
// buses, 1 access link per A-block and 2-cycle multipliers, as the design
// evaluates it. The data width, the register counts per A-block (6, 5, 4),
// the port numbering, the control-word layout and the microprogram itself are
// this implementation's own choices (see diffeq_program below).
package sast_pkg;

  // ---------------------------------------------------------------- sizes
  parameter int unsigned W             = 16; // data word width
  parameter int unsigned NUM_ABLK      = 3;  // A-blocks
  parameter int unsigned NUM_BUS       = 2;  // global buses
  parameter int unsigned ACCESS_WIDTH  = 1;  // access links per A-block
  parameter int unsigned MAX_REGS      = 6;  // largest register file of any A-block
  parameter int unsigned NUM_IN_PORTS  = 3;  // input ports
  parameter int unsigned NUM_OUT_PORTS = 2;  // output ports
  parameter int unsigned NUM_GMEM      = 1;  // global memories
  parameter int unsigned GMEM_DEPTH    = 16; // words of each global memory
  parameter int unsigned CS_DEPTH      = 32; // control-store entries
  parameter int unsigned MUL_LATENCY   = 2;  // control steps of a multiplication
  parameter int unsigned MAX_REG_WRITES = 2; // register loads per A-block per step

  // register-file size of each A-block, A0 first
  parameter int unsigned ABLK_REGS [NUM_ABLK] = '{6, 5, 4};

  localparam int unsigned IDX_W   = $clog2(MAX_REGS);
  localparam int unsigned BSEL_W  = (NUM_BUS > 1) ? $clog2(NUM_BUS) : 1;
  localparam int unsigned LSEL_W  = (ACCESS_WIDTH > 1) ? $clog2(ACCESS_WIDTH) : 1;
  localparam int unsigned GADDR_W = $clog2(GMEM_DEPTH);
  localparam int unsigned UPC_W   = $clog2(CS_DEPTH);
  localparam int unsigned ABLK_W  = (NUM_ABLK > 1) ? $clog2(NUM_ABLK) : 1;
  // bus sources: every access link, every input port, every global memory
  // and the controller's immediate
  localparam int unsigned NUM_SRC = NUM_ABLK * ACCESS_WIDTH + NUM_IN_PORTS + NUM_GMEM + 1;

  typedef logic [W-1:0] word_t;

  typedef enum logic [2:0] {
    FU_NOP = 3'd0,
    FU_ADD = 3'd1,
    FU_SUB = 3'd2,
    FU_MUL = 3'd3,
    FU_LT  = 3'd4   // signed less-than, result 0 or 1, also the status bit
  } fu_op_e;

  // FU operand select: a local register or an access link
  typedef struct packed {
    logic             from_link;
    logic [IDX_W-1:0] idx;        // register index, or link index
  } opsel_t;

  // one access link: the switch to one bus, and the out switch feeding it
  typedef struct packed {
    logic              drive;     // 1: link drives the bus, 0: link listens
    logic [BSEL_W-1:0] bus;       // which global bus the link is switched to
    logic              from_fu;   // drive the FU output (else a register)
    logic [IDX_W-1:0]  reg_idx;   // register to drive
  } link_ctrl_t;

  // in switch of one register
  typedef struct packed {
    logic              we;
    logic              from_link; // 1: load from an access link, 0: from the FU
    logic [LSEL_W-1:0] link;
  } regwr_t;

  typedef struct packed {
    fu_op_e                        op;
    opsel_t                        opa;
    opsel_t                        opb;
    regwr_t     [MAX_REGS-1:0]     wr;
    link_ctrl_t [ACCESS_WIDTH-1:0] link;
  } ablk_ctrl_t;

  // a non-A-block unit connected to one bus for one step
  typedef struct packed {
    logic              en;
    logic [BSEL_W-1:0] bus;
  } bus_tap_t;

  // one request to drive a global bus
  typedef struct packed {
    logic              en;
    logic [BSEL_W-1:0] bus;
    word_t             data;
  } bus_drv_t;

  typedef enum logic [1:0] {
    SEQ_NEXT      = 2'd0, // go to the next control step
    SEQ_JUMP      = 2'd1, // go to target
    SEQ_BR_STATUS = 2'd2, // go to target if the selected A-block's status is 1
    SEQ_DONE      = 2'd3  // last step: signal done and return to idle
  } seq_e;

  // one control word (one control step)
  typedef struct packed {
    ablk_ctrl_t [NUM_ABLK-1:0]      ablk;
    bus_tap_t   [NUM_IN_PORTS-1:0]  in_rd;   // input port p drives the bus
    bus_tap_t   [NUM_OUT_PORTS-1:0] out_wr;  // output port p takes the bus
    bus_tap_t   [NUM_GMEM-1:0]      gm_rd;   // global memory m drives the bus
    bus_tap_t   [NUM_GMEM-1:0]      gm_wr;   // global memory m takes the bus
    logic       [NUM_GMEM-1:0][GADDR_W-1:0] gm_addr;
    bus_tap_t                       imm_drv; // controller drives imm on the bus
    word_t                          imm;
    seq_e                           seq;
    logic       [ABLK_W-1:0]        status_sel;
    logic       [UPC_W-1:0]         target;
  } uinstr_t;

  typedef uinstr_t cstore_t [CS_DEPTH];

  // ------------------------------------------------- microprogram helpers
  function automatic opsel_t R(int unsigned i);
    return '{from_link: 1'b0, idx: IDX_W'(i)};
  endfunction

  function automatic opsel_t L(int unsigned k);
    return '{from_link: 1'b1, idx: IDX_W'(k)};
  endfunction

  function automatic uinstr_t issue(input uinstr_t u, input int unsigned a, input fu_op_e o,
                             input opsel_t x, input opsel_t y);
    u.ablk[a].op  = o;
    u.ablk[a].opa = x;
    u.ablk[a].opb = y;
    return u;
  endfunction

  // register r of A-block a loads the FU output
  function automatic uinstr_t wr_fu(input uinstr_t u, input int unsigned a, input int unsigned r);
    u.ablk[a].wr[r] = '{we: 1'b1, from_link: 1'b0, link: '0};
    return u;
  endfunction

  // link 0 of A-block a listens to bus b; register r loads it (r < 0: none)
  function automatic uinstr_t listen(input uinstr_t u, input int unsigned a, input int unsigned b,
                                 input int r);
    u.ablk[a].link[0] = '{drive: 1'b0, bus: BSEL_W'(b), from_fu: 1'b0, reg_idx: '0};
    if (r >= 0) u.ablk[a].wr[r] = '{we: 1'b1, from_link: 1'b1, link: '0};
    return u;
  endfunction

  // link 0 of A-block a drives register r (r < 0: the FU output) onto bus b
  function automatic uinstr_t drive(input uinstr_t u, input int unsigned a, input int unsigned b,
                                input int r);
    u.ablk[a].link[0] = '{drive: 1'b1, bus: BSEL_W'(b), from_fu: (r < 0),
                          reg_idx: (r < 0) ? '0 : IDX_W'(r)};
    return u;
  endfunction

  function automatic uinstr_t port_in(input uinstr_t u, input int unsigned p, input int unsigned b);
    u.in_rd[p] = '{en: 1'b1, bus: BSEL_W'(b)};
    return u;
  endfunction

  function automatic uinstr_t port_out(input uinstr_t u, input int unsigned p, input int unsigned b);
    u.out_wr[p] = '{en: 1'b1, bus: BSEL_W'(b)};
    return u;
  endfunction

  // --------------------------------------------------- DIFFEQ microprogram
  // The loop
  //   do { x1 = x + dx;  u1 = u - 3*x*u*dx - 3*y*dx;  y1 = y + u*dx;
  //        x = x1; u = u1; y = y1; } while (x < a);
  // in four basic blocks: I (read inputs), B1 (loop body), C1 (test),
  // B2 (write results). Inputs: port 0 gives dx then y, port 1 gives x then
  // u, port 2 gives a. Outputs: port 0 takes x then u, port 1 takes y.
  //
  // Register binding (A-block.register):
  //   A0: R0 x, R1 dx, R2 a, R3 constant 3, R4 3*x, R5 u*dx
  //   A1: R0 y, R1 dx, R2 constant 3, R3 3*y then 3*y*dx, R4 u*dx (copy)
  //   A2: R0 u, R1 dx, R2 3*x*u*dx then u-3*x*u*dx, R3 u*dx
  localparam int unsigned DQ_LOOP = 4;  // first step of B1
  localparam int unsigned DQ_TEST = 10; // C1
  localparam int unsigned DQ_LEN  = 13; // steps in the program

  function automatic cstore_t diffeq_program();
    cstore_t p;
    for (int i = 0; i < CS_DEPTH; i++) p[i] = '0;
    // ---- I: read the inputs
    p[0] = port_in(p[0], 0, 0);                                        // dx -> A0, A1, A2
    p[0] = listen(p[0], 0, 0, 1); p[0] = listen(p[0], 1, 0, 1); p[0] = listen(p[0], 2, 0, 1);
    p[1] = port_in(p[1], 1, 0); p[1] = listen(p[1], 0, 0, 0);          // x -> A0.R0
    p[1] = port_in(p[1], 0, 1); p[1] = listen(p[1], 1, 1, 0);          // y -> A1.R0
    p[2] = port_in(p[2], 1, 0); p[2] = listen(p[2], 2, 0, 0);          // u -> A2.R0
    p[2] = port_in(p[2], 2, 1); p[2] = listen(p[2], 0, 1, 2);          // a -> A0.R2
    p[3].imm_drv = '{en: 1'b1, bus: '0}; p[3].imm = word_t'(3);        // 3 -> A0.R3, A1.R2
    p[3] = listen(p[3], 0, 0, 3); p[3] = listen(p[3], 1, 0, 2);
    // ---- B1: loop body, six steps
    p[4] = issue(p[4], 0, FU_MUL, R(3), R(0));                         // 3*x
    p[4] = issue(p[4], 1, FU_MUL, R(2), R(0));                         // 3*y
    p[4] = issue(p[4], 2, FU_MUL, R(0), R(1));                         // u*dx
    p[5] = wr_fu(p[5], 0, 4); p[5] = wr_fu(p[5], 1, 3);
    p[5] = drive(p[5], 2, 0, -1); p[5] = listen(p[5], 0, 0, 5);        // u*dx: A2 -> A0
    p[6] = issue(p[6], 0, FU_MUL, R(4), R(5));                         // 3*x*u*dx
    p[6] = issue(p[6], 1, FU_MUL, R(3), R(1));                         // 3*y*dx
    p[6] = issue(p[6], 2, FU_MUL, R(0), R(1));                         // u*dx
    p[7] = drive(p[7], 0, 0, -1); p[7] = listen(p[7], 2, 0, 2);        // 3xudx: A0 -> A2
    p[7] = wr_fu(p[7], 1, 3); p[7] = wr_fu(p[7], 2, 3);
    p[8] = issue(p[8], 0, FU_ADD, R(0), R(1)); p[8] = wr_fu(p[8], 0, 0); // x = x + dx
    p[8] = issue(p[8], 2, FU_SUB, R(0), R(2)); p[8] = wr_fu(p[8], 2, 2); // u - 3xudx
    p[8] = drive(p[8], 2, 0, 3); p[8] = listen(p[8], 1, 0, 4);         // u*dx: A2 -> A1
    p[9] = issue(p[9], 1, FU_ADD, R(0), R(4)); p[9] = wr_fu(p[9], 1, 0); // y = y + u*dx
    p[9] = drive(p[9], 1, 0, 3); p[9] = listen(p[9], 2, 0, -1);        // 3ydx: A1 -> A2 link
    p[9] = issue(p[9], 2, FU_SUB, R(2), L(0)); p[9] = wr_fu(p[9], 2, 0); // u = ... - 3ydx
    // ---- C1: loop test
    p[10] = issue(p[10], 0, FU_LT, R(0), R(2));                        // x < a
    p[10].seq = SEQ_BR_STATUS; p[10].status_sel = '0; p[10].target = UPC_W'(DQ_LOOP);
    // ---- B2: write the results
    p[11] = drive(p[11], 0, 0, 0); p[11] = port_out(p[11], 0, 0);      // x -> port 0
    p[11] = drive(p[11], 1, 1, 0); p[11] = port_out(p[11], 1, 1);      // y -> port 1
    p[12] = drive(p[12], 2, 0, 0); p[12] = port_out(p[12], 0, 0);      // u -> port 0
    p[12].seq = SEQ_DONE;
    return p;
  endfunction

endpackage
