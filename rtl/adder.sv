// adder: W-bit two's-complement adder in two implementations, for the FU's
// add and subtract.
//
// The synthesis flow this data path comes from keeps several implementations
// of an operation in its module library. It picks a slow, cheap adder where
// the schedule leaves slack and a fast one elsewhere. This module offers
// both:
//
//   FAST = 0: ripple-carry adder. W full-adder cells in a chain; the carry
//             ripples through all of them (delay grows with W, area smallest).
//   FAST = 1: parallel-prefix (Kogge-Stone) adder. Generate/propagate pairs
//             are combined in log2(W) levels, so every carry is ready after
//             log2(W) prefix stages (delay grows with log W, more area).
//
// s = a + b + cin, cout is the carry out of the top bit. Subtraction is
// a + ~b + 1. Purely combinational. That two speeds exist follows the
// design; the two circuits chosen for them are this implementation's own.
module adder #(
  parameter int unsigned W    = 16,
  parameter bit          FAST = 1'b1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;   // c[i] is the carry into bit i

  assign c[0] = cin;
  assign cout = c[W];

  if (!FAST) begin : g_ripple
    for (genvar i = 0; i < W; i++) begin : g_bit
      assign s[i]   = a[i] ^ b[i] ^ c[i];
      assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
    end
  end else begin : g_prefix
    localparam int unsigned L = (W > 1) ? $clog2(W) : 1;
    // g[k][i], p[k][i]: group generate/propagate of bits (i - 2^k + 1 .. i)
    // after k prefix levels; bit -1 is the carry in
    logic [L:0][W-1:0] g, p;
    for (genvar i = 0; i < W; i++) begin : g_init
      if (i == 0) begin : g_lsb
        assign g[0][0] = (a[0] & b[0]) | ((a[0] ^ b[0]) & cin);
        assign p[0][0] = 1'b0;
      end else begin : g_other
        assign g[0][i] = a[i] & b[i];
        assign p[0][i] = a[i] ^ b[i];
      end
    end
    for (genvar k = 0; k < L; k++) begin : g_level
      for (genvar i = 0; i < W; i++) begin : g_node
        if (i >= (1 << k)) begin : g_comb
          assign g[k+1][i] = g[k][i] | (p[k][i] & g[k][i - (1 << k)]);
          assign p[k+1][i] = p[k][i] & p[k][i - (1 << k)];
        end else begin : g_pass
          assign g[k+1][i] = g[k][i];
          assign p[k+1][i] = p[k][i];
        end
      end
    end
    for (genvar i = 0; i < W; i++) begin : g_sum
      assign c[i+1] = g[L][i];
      assign s[i]   = a[i] ^ b[i] ^ c[i];
    end
  end

endmodule
