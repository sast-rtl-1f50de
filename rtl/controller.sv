// controller: microcoded controller of the structured data path.
//
// The controller holds one control word per control step in a control store
// of CS_DEPTH entries and sequences through it. Each word carries the FU
// operation and the in/out switch settings of every A-block, the bus taps of
// the ports and the global memory, an immediate, and a sequencing field:
// next step, jump, branch on the status signal of one A-block, or done.
//
// Operation: start (while idle) begins at step 0. Each cycle is one control
// step; ctrl shows the current word (all zero, i.e. no operation, while
// idle). stall holds the current step, and the data path then writes
// nothing. The word marked done ends the run: done pulses for one cycle in
// that step and the controller returns to idle. A branch is decided in the
// step of the compare, from the combinational status of the named A-block.
//
// The control store is loaded with the DIFFEQ program at reset. While idle,
// prog_we writes prog_data into entry prog_addr, so the same data path can run
// another schedule.
//
// That the controller drives every A-block and switch and takes status
// signals back follows the design; the microcoded form, the sequencing field,
// the start/done handshake and the loadable store are this implementation's
// choices.
module controller
  import sast_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                stall,
  input  logic [NUM_ABLK-1:0] status,
  input  logic                prog_we,
  input  logic [UPC_W-1:0]    prog_addr,
  input  uinstr_t             prog_data,
  output uinstr_t             ctrl,
  output logic                busy,
  output logic                done,
  output logic [UPC_W-1:0]    upc
);

  uinstr_t cs [CS_DEPTH];
  uinstr_t cur;
  logic    take;

  assign cur  = cs[upc];
  assign ctrl = busy ? cur : '0;
  assign take = (cur.seq == SEQ_JUMP) ||
                ((cur.seq == SEQ_BR_STATUS) && status[cur.status_sel]);
  assign done = busy && !stall && (cur.seq == SEQ_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs <= diffeq_program();
    end else if (prog_we && !busy) begin
      cs[prog_addr] <= prog_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      upc  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        upc  <= '0;
      end
    end else if (!stall) begin
      if (cur.seq == SEQ_DONE) begin
        busy <= 1'b0;
        upc  <= '0;
      end else if (take) begin
        upc <= cur.target;
      end else begin
        upc <= upc + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(prog_we && busy)) else $error("controller: program write while running");
      if (busy && cur.seq == SEQ_BR_STATUS)
        assert (int'(cur.status_sel) < NUM_ABLK) else $error("controller: bad status select");
    end
  end

endmodule
