// adder_tree: pipelined sum of the element outputs of one beam.
//
// A binary tree of registered two-input adders: for four elements, elements
// 0+1 and 2+3 are added and registered, then the two partial sums. This is
// the split of the multi-input adder used to shorten the critical path; N_IN
// must be a power of two (4, 8, 16), giving log2(N_IN) register levels. The
// partial sums carry every bit they need; only the final sum is cut to OUT_W
// bits (the filter input width N). With the enlarged weight scale a few weight
// sets ("forbidden angles") push the sum outside that range: it then wraps,
// and `ovf` marks the sample (the flag is this design's addition).
//
// Timing: every level loads on the half-rate strobe `en`; latency
// log2(N_IN) strobes (two for the default four elements).
// Reset: asynchronous, active high.
module adder_tree
  import bf_pkg::*;
#(
  parameter int unsigned N_IN  = NUM_ELEM,
  parameter int unsigned IN_W  = CWM_WIDTH,
  parameter int unsigned OUT_W = BF_WIDTH
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  ei [N_IN],
  input  logic signed [IN_W-1:0]  eq [N_IN],
  output logic signed [OUT_W-1:0] i_bf,
  output logic signed [OUT_W-1:0] q_bf,
  output logic                    ovf
);

  localparam int unsigned LEVELS = $clog2(N_IN);
  localparam int unsigned SUM_W  = IN_W + LEVELS;   // exact width of the total

  typedef logic signed [SUM_W-1:0] sum_t;
  typedef logic signed [OUT_W-1:0] out_t;

  // Heap numbering: node n has children 2n and 2n+1; the leaves are nodes
  // N_IN .. 2*N_IN-1 (the inputs), nodes 2 .. N_IN-1 are registered partial
  // sums and node 1, the root, is the final sum.
  sum_t ri [N_IN];            // registered internal nodes (0 and 1 unused)
  sum_t rq [N_IN];
  sum_t vi [2*N_IN];          // value of every node
  sum_t vq [2*N_IN];

  always_comb begin
    for (int n = 0; n < 2 * N_IN; n++) begin
      if (n >= N_IN) begin
        vi[n] = sum_t'(ei[n-N_IN]);
        vq[n] = sum_t'(eq[n-N_IN]);
      end else if (n >= 2) begin
        vi[n] = ri[n];
        vq[n] = rq[n];
      end else begin
        vi[n] = '0;
        vq[n] = '0;
      end
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int n = 0; n < N_IN; n++) begin
        ri[n] <= '0;
        rq[n] <= '0;
      end
    end else if (en) begin
      for (int n = 2; n < N_IN; n++) begin
        ri[n] <= vi[2*n] + vi[2*n+1];
        rq[n] <= vq[2*n] + vq[2*n+1];
      end
    end
  end

  // root: final sum, cut to OUT_W bits, with the overflow flag
  sum_t si, sq;

  always_comb begin
    si = vi[2] + vi[3];
    sq = vq[2] + vq[3];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      i_bf <= '0;
      q_bf <= '0;
      ovf  <= 1'b0;
    end else if (en) begin
      i_bf <= out_t'(si);
      q_bf <= out_t'(sq);
      ovf  <= (sum_t'(out_t'(si)) != si) || (sum_t'(out_t'(sq)) != sq);
    end
  end

  initial assert (N_IN >= 2 && (1 << LEVELS) == N_IN)
    else $error("adder_tree: N_IN must be a power of two");

endmodule
