// global_bus: the global buses of the structured data path.
//
// Every unit that can put a word on a bus (each A-block access link, each
// input port, the global memory, the controller's immediate) raises one drive
// request: an enable, the number of the bus, and the word. Bus b carries the
// word of the one enabled request that names it, or 0 if none does. The
// buses are built as AND-OR multiplexers, not as tristate lines.
//
// A schedule must give each bus at most one driver per step. conflict[b]
// flags a bus with several drivers (the words are then OR-ed), and an
// assertion reports it in simulation.
//
// Connecting the units through a few shared global buses is the design's
// central idea; the multiplexer implementation, the 0 on an idle bus and the
// conflict flag are this implementation's choices. Purely combinational.
module global_bus
  import sast_pkg::*;
#(
  parameter int unsigned NSRC = NUM_SRC,
  parameter int unsigned NBUS = NUM_BUS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  bus_drv_t [NSRC-1:0]  drv,
  output word_t    [NBUS-1:0]  bus,
  output logic     [NBUS-1:0]  conflict
);

  always_comb begin
    logic seen;
    for (int b = 0; b < NBUS; b++) begin
      bus[b]      = '0;
      conflict[b] = 1'b0;
      seen        = 1'b0;
      for (int s = 0; s < NSRC; s++) begin
        if (drv[s].en && (int'(drv[s].bus) == b)) begin
          if (seen) conflict[b] = 1'b1;
          seen   = 1'b1;
          bus[b] = bus[b] | drv[s].data;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n)
      assert (conflict == '0) else $error("global_bus: two drivers on one bus");
  end

endmodule
