// co_logic: magnitude comparison for the subtraction carry-in.
//
// Co is the group generate of |N1| + not|N2| across all magnitude bits,
// with bit generate G_i = N1_i & ~N2_i and propagate P_i = N1_i ^ ~N2_i
// (here n2_n already holds ~N2).
// Co = 1 exactly when |N1| > |N2|; on effective subtraction it is the
// carry-in that turns the one's-complement sum into a two's-complement
// difference, and Co = 0 marks a result that is left in one's complement
// and inverted at the output.
//
// The group generate is reduced by a log-depth tree of (G, P) pairs,
// (Gh, Ph) o (Gl, Pl) = (Gh | Ph & Gl, Ph & Pl), so that Co is ready in
// parallel with the adder. The equation is the reference design's; the
// tree shape is this design's choice.
//
// Interface: n1[WIDTH] = |N1|, n2_n[WIDTH] = not |N2|, co. Combinational.
module co_logic #(
  parameter int unsigned WIDTH = 31
) (
  input  logic [WIDTH-1:0] n1,
  input  logic [WIDTH-1:0] n2_n,
  output logic             co
);

  localparam int unsigned LEVELS = $clog2(WIDTH) + 1;

  always_comb begin
    logic [WIDTH-1:0] gg;
    logic [WIDTH-1:0] pp;
    int unsigned      n;
    gg = n1 & n2_n;
    pp = n1 ^ n2_n;
    n  = WIDTH;
    for (int unsigned lvl = 0; lvl < LEVELS; lvl++) begin
      if (n > 1) begin
        // Combine neighbour pairs (2j+1 is the more significant one); an
        // unpaired top element moves down unchanged.
        for (int unsigned j = 0; j < WIDTH; j++) begin
          if (j < n / 2) begin
            gg[j] = gg[2*j+1] | (pp[2*j+1] & gg[2*j]);
            pp[j] = pp[2*j+1] & pp[2*j];
          end else if (j == n / 2 && (n % 2) == 1) begin
            gg[j] = gg[2*j];
            pp[j] = pp[2*j];
          end
        end
        n = (n + 1) / 2;
      end
    end
    co = gg[0];
  end

endmodule
