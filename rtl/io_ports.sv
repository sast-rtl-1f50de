// io_ports: the input and output ports of the structured data path.
//
// The ports sit on the global buses like the A-blocks. In a control step that
// reads input port p ("read from port"), the port drives its word onto the
// bus named by the control word and the word is consumed: in_ack[p] pulses.
// If the word is not there yet (in_valid[p] = 0) the port raises stall and
// the whole data path waits, step and all, until it arrives. In a step that
// writes output port p ("write to port"), the port takes the word on its bus
// into an output register at the end of the step and pulses out_valid[p]
// for one cycle.
//
// en is the data path's step enable (0 while stalled); it gates the
// consumption of input words and the writes to output registers.
//
// The ports, and that a port may be read or written several times in a run,
// follow the design's DIFFEQ schedule. The valid/acknowledge handshake, the
// stall and the registered outputs are this implementation's choices.
module io_ports
  import sast_pkg::*;
#(
  parameter int unsigned NIN  = NUM_IN_PORTS,
  parameter int unsigned NOUT = NUM_OUT_PORTS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  bus_tap_t [NIN-1:0]    rd,
  input  bus_tap_t [NOUT-1:0]   wr,
  input  word_t    [NUM_BUS-1:0] bus,
  input  word_t    [NIN-1:0]    in_data,
  input  logic     [NIN-1:0]    in_valid,
  output logic     [NIN-1:0]    in_ack,
  output bus_drv_t [NIN-1:0]    drv,
  output logic                  stall,
  output word_t    [NOUT-1:0]   out_data,
  output logic     [NOUT-1:0]   out_valid
);

  always_comb begin
    stall = 1'b0;
    for (int p = 0; p < NIN; p++) begin
      drv[p].en   = rd[p].en;
      drv[p].bus  = rd[p].bus;
      drv[p].data = in_data[p];
      in_ack[p]   = rd[p].en && in_valid[p] && en;
      if (rd[p].en && !in_valid[p]) stall = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data  <= '0;
      out_valid <= '0;
    end else begin
      for (int p = 0; p < NOUT; p++) begin
        out_valid[p] <= en && wr[p].en;
        if (en && wr[p].en) out_data[p] <= bus[wr[p].bus];
      end
    end
  end

endmodule
