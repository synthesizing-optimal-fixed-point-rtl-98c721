// adder_tree: sums N signed terms with a balanced tree of pairwise adders.
//
// Summing N terms one at a time into an accumulator lets a fixed-point
// library grow the word by one integer bit per addition (N-1 bits in all).
// Pairing the terms instead (level 0 adds terms 0+1, 2+3, ...; each later
// level adds neighbouring partial sums) grows the word by one bit per level,
// log2(N) bits in all, which is exactly what the sum can need. For 8 products
// in (1/0/22) the levels are (1/1/22), (1/2/22) and (1/3/22). The pairing and
// the widths follow the design's source; the generic form over N is this
// design's own.
//
// Interface: terms[N] of WI bits each, sum of WI+log2(N) bits, all signed.
// N must be a power of two, at least 2. Timing: combinational; the depth is
// log2(N) adders.
module adder_tree #(
  parameter int unsigned N  = 8,
  parameter int unsigned WI = 23
) (
  input  logic signed [WI-1:0]          terms [N],
  output logic signed [WI+$clog2(N)-1:0] sum
);

  localparam int unsigned L = $clog2(N);

  if (N < 2 || (1 << L) != N) begin : g_bad_n
    $error("adder_tree: N must be a power of two of at least 2");
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned WO  = WI + l + 1;
    localparam int unsigned CNT = N >> (l + 1);
    logic signed [WO-1:0] s [CNT];
    for (genvar k = 0; k < CNT; k++) begin : g_add
      if (l == 0) begin : g_leaf
        assign s[k] = WO'(terms[2*k]) + WO'(terms[2*k+1]);
      end else begin : g_node
        assign s[k] = WO'(g_lvl[l-1].s[2*k]) + WO'(g_lvl[l-1].s[2*k+1]);
      end
    end
  end

  assign sum = g_lvl[L-1].s[0];

endmodule
