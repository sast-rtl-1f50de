// fu: functional unit of one A-block.
//
// Adds, subtracts, compares (signed less-than) and multiplies W-bit words.
// Add, subtract and compare are single-step operations: the result is on y in
// the same control step as the operation. A multiplication takes MUL_LAT
// control steps: its operands are taken in the first step and the product
// appears on y in the last one, when it can be written to a register or put
// on a global bus. Products are truncated to the low W bits.
//
// With MUL_PIPELINED = 0 (the DIFFEQ configuration) the multiplier is a
// multi-cycle unit: no new multiplication may start while one is in flight.
// With MUL_PIPELINED = 1 one may start every step. In both cases the
// schedule must not start a single-step operation in the step in which a
// product leaves the unit; assertions check both rules.
//
// Add and subtract use one adder, ripple-carry (slow, small) or
// parallel-prefix (fast) as FAST_ADDER selects; the synthesis flow this
// follows picks the slow one for operations with slack. The carry out is not
// needed.
//
// Ports: op selects the operation, a/b are the operands, en = 0 freezes the
// multiplier pipeline (controller stall). lt is the compare result, used as
// the A-block's status signal to the controller. busy is 1 while a product
// is in flight.
//
// The operation set and the 2-step multiply follow the DIFFEQ evaluation;
// truncation, signed compare and the result-on-last-step timing are this
// implementation's choices.
module fu
  import sast_pkg::*;
#(
  parameter int unsigned MUL_LAT       = MUL_LATENCY,
  parameter bit          MUL_PIPELINED = 1'b0,
  parameter bit          FAST_ADDER    = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  fu_op_e op,
  input  word_t  a,
  input  word_t  b,
  output word_t  y,
  output logic   lt,
  output logic   busy
);

  word_t alu;
  word_t sum;
  logic  sub;
  logic  unused_cout;

  assign lt  = ($signed(a) < $signed(b));
  assign sub = (op == FU_SUB);

  // add and subtract share one adder: a - b = a + ~b + 1
  adder #(.W(W), .FAST(FAST_ADDER)) u_add (
    .a   (a),
    .b   (sub ? ~b : b),
    .cin (sub),
    .s   (sum),
    .cout(unused_cout)
  );

  always_comb begin
    unique case (op)
      FU_ADD:  alu = sum;
      FU_SUB:  alu = sum;
      FU_LT:   alu = word_t'(lt);
      FU_MUL:  alu = (MUL_LAT <= 1) ? word_t'(a * b) : '0;
      default: alu = '0;
    endcase
  end

  if (MUL_LAT > 1) begin : g_mul
    localparam int unsigned S = MUL_LAT - 1;  // pipeline stages
    logic  [S-1:0] v;
    word_t         p [S];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v <= '0;
        for (int i = 0; i < S; i++) p[i] <= '0;
      end else if (en) begin
        v[0] <= (op == FU_MUL);
        p[0] <= word_t'(a * b);
        for (int i = 1; i < S; i++) begin
          v[i] <= v[i-1];
          p[i] <= p[i-1];
        end
      end
    end

    assign y    = v[S-1] ? p[S-1] : alu;
    assign busy = |v;

    // schedule rules
    always_ff @(posedge clk) begin
      if (rst_n && en) begin
        assert (!(v[S-1] && (op inside {FU_ADD, FU_SUB, FU_LT})))
          else $error("fu: single-step operation in the step a product leaves");
        if (!MUL_PIPELINED)
          assert (!(op == FU_MUL && (|v)))
            else $error("fu: multiplication started while the multiplier is busy");
      end
    end
  end else begin : g_comb
    assign y    = alu;
    assign busy = 1'b0;
  end

endmodule
