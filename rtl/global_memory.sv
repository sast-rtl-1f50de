// global_memory: a global memory of the structured data path.
//
// A DEPTH-word memory that sits on the global buses like an A-block, for
// values such as array elements that the A-blocks' registers should not hold.
// In one control step it can take the word on one bus and store it (wr) and
// put one stored word on a bus (rd), both at the address addr given by the
// control word.
//
// Timing: the read is combinational (the word is on the bus in the same step
// as the request); the write happens at the clock edge that ends the step, if
// en is 1. A read and a write in the same step at the same address read the
// old word. Contents are cleared by reset.
//
// Connecting memories to the global buses like A-blocks follows the design;
// the single shared address, the asynchronous read and the reset are this
// implementation's choices, since the design gives no memory organisation.
module global_memory
  import sast_pkg::*;
#(
  parameter int unsigned DEPTH = GMEM_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  bus_tap_t                   rd,
  input  bus_tap_t                   wr,
  input  logic     [$clog2(DEPTH)-1:0] addr,
  input  word_t    [NUM_BUS-1:0]     bus,
  output bus_drv_t                   drv
);

  word_t mem [DEPTH];

  assign drv.en   = rd.en;
  assign drv.bus  = rd.bus;
  assign drv.data = mem[addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (en && wr.en) begin
      mem[addr] <= bus[wr.bus];
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && en && rd.en && wr.en)
      assert (rd.bus != wr.bus) else $error("global_memory: reads and writes the same bus");
  end

endmodule
