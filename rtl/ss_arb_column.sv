// One output column of a Swizzle-Switch: inhibit-based arbitration with a
// least-recently-granted (LRG) priority matrix, and the column's Granted
// flip-flops.
//
// The column holds an N x N priority matrix M; M(i,j) = 1 means input i has
// priority over input j. It is stored by inhibit line: inh[j] is column j of
// the matrix, the set of inputs that pull down inhibit line X_j, so
// inh[j][i] = M(i,j). In an arbitration cycle every requesting input i pulls
// down the inhibit line X_j of every input j it has priority over; an input
// whose own inhibit line stays high wins. In silicon the inhibit lines are
// the column's precharged output bit-lines; here X_j is low when
// |(req & inh[j]). The winner is latched into the Granted
// flip-flops at the clock edge that ends the arbitration cycle, and the
// column then stays in data-transmission mode until the granted input
// asserts its release line. On every grant to input w the LRG update clears
// row w (w inhibits nobody) and sets column w (everybody inhibits w), which
// moves w to the lowest priority and keeps the matrix a strict total order.
//
// The arbitration rule and the LRG update are the published mechanism. The
// reset order (input 0 highest: inh[j] holds every input below j), the load port for the
// matrix and the 'en' input that lets a neighbour veto arbitration in a cycle
// are this design's choices.
//
// Timing: req in cycle t -> gnt valid from cycle t+1. rel in cycle t ->
// column free (arbitrating) from cycle t+1. 'win' is the combinational
// arbitration result of the current cycle.
module ss_arb_column #(
  parameter int unsigned N = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          req,      // request bit of each input bus
  input  logic                  en,       // column may arbitrate this cycle
  input  logic [N-1:0]          rel,      // release line of each input
  input  logic                  cfg_we,   // load the priority matrix
  input  logic [N-1:0][N-1:0]   cfg_inh,  // [j][i]: input i inhibits input j
  output logic [N-1:0]          gnt,      // Granted flip-flops
  output logic                  busy,     // data-transmission mode
  output logic [N-1:0]          win,      // this cycle's arbitration winner
  output logic [N-1:0][N-1:0]   inh       // current matrix, [j][i] = M(i,j)
);

  logic [N-1:0] x_low;   // inhibit line X_j discharged
  logic         arb;

  assign busy = |gnt;
  assign arb  = en && !busy;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      x_low[j] = |(req & inh[j]);
      win[j]   = arb && req[j] && !x_low[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt <= '0;
      for (int j = 0; j < N; j++)
        inh[j] <= (N'(1) << j) - N'(1);
    end else begin
      if (busy) begin
        if (|(gnt & rel)) gnt <= '0;
      end else if (|win) begin
        gnt <= win;
        // LRG: clear the winner's row (it inhibits nobody) and set its
        // column (everybody inhibits it).
        for (int j = 0; j < N; j++)
          inh[j] <= win[j] ? ~(N'(1) << j) : (inh[j] & ~win);
      end
      if (cfg_we)
        for (int j = 0; j < N; j++)
          inh[j] <= cfg_inh[j] & ~(N'(1) << j);
    end
  end

  // At most one input holds the column; a strict total order yields one winner.
  a_gnt_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_win_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(win));

endmodule
