// Swizzle-Switch: an N-input, M-output, W-bit self-arbitrating crossbar.
//
// Input buses run horizontally and output buses vertically; every crosspoint
// holds a Granted flip-flop and the column's priority bits, so arbitration
// sits inside the crossbar instead of in a separate arbiter. The buses are
// reused for arbitration: while an input asserts in_req, bit k of its bus is
// its request for output k, so one input may request any subset of outputs
// (multicast) in a single cycle. Each output column arbitrates on its own
// (ss_arb_column, least-recently-granted priority) and, once granted, stays in
// data-transmission mode until the granted input asserts in_rel.
//
// Data path: an output bit-line is precharged to 1 and discharged through
// every granted crosspoint whose input bit is 0, i.e. the output carries the
// AND over the granted inputs (a single one, or all ones when none). The
// read buffer (sense amplifier) at the bottom of each column is a register.
//
// Interface: in_bus/in_req/in_valid/in_rel per input row; gnt[i][k] is the
// Granted flip-flop of crosspoint (i,k), the grant line back to input i.
// col_req/col_busy report each column's request and mode; col_en lets a
// neighbour block a column's arbitration for a cycle. cfg_* loads the
// priority matrix of one column.
//
// Timing: request in cycle t, grant visible in t+1; a data beat driven in
// cycle t appears in the read buffer (out_*) in cycle t+1. in_rel with the
// last beat frees the granted columns from the next cycle.
//
// The crossbar organisation, bus reuse, multicast and LRG arbitration follow
// the published design. The in_req/in_valid strobes that tell requests from
// data, the release line taken with the last beat, and the out_valid/out_last/
// out_src framing are this design's choices. The bus must be at least as wide
// as both the input and the output count, since each input owns one output
// bit-line as its inhibit line and each output owns one input bit as its
// request line.
module swizzle_switch #(
  parameter int unsigned N  = 64,   // inputs
  parameter int unsigned M  = 64,   // outputs
  parameter int unsigned W  = 128,  // bus width
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0][W-1:0]   in_bus,
  input  logic [N-1:0]          in_req,
  input  logic [N-1:0]          in_valid,
  input  logic [N-1:0]          in_rel,
  input  logic [M-1:0]          col_en,
  input  logic                  cfg_we,
  input  logic [MW-1:0]         cfg_col,
  input  logic [N-1:0][N-1:0]   cfg_inh,
  output logic [N-1:0][M-1:0]   gnt,
  output logic [M-1:0]          col_req,
  output logic [M-1:0]          col_busy,
  output logic [M-1:0]          out_valid,
  output logic [M-1:0]          out_last,
  output logic [M-1:0][SW-1:0]  out_src,
  output logic [M-1:0][W-1:0]   out_data
);

  initial begin
    assert (W >= N && W >= M)
      else $error("swizzle_switch: bus width %0d below port count", W);
  end

  logic [M-1:0][N-1:0] col_reqv;   // request bit k of every input, per column
  logic [M-1:0][N-1:0] col_gnt;    // Granted FFs, per column
  logic [M-1:0][N-1:0] col_win;
  logic [M-1:0][W-1:0] bitline;    // output bit-lines after discharge
  logic [M-1:0]        nxt_valid, nxt_last;
  logic [M-1:0][SW-1:0] nxt_src;

  for (genvar k = 0; k < M; k++) begin : g_col
    for (genvar i = 0; i < N; i++) begin : g_row
      assign col_reqv[k][i] = in_req[i] && in_bus[i][k];
      assign gnt[i][k]      = col_gnt[k][i];
    end
    assign col_req[k] = |col_reqv[k];

    ss_arb_column #(.N(N)) u_arb (
      .clk      (clk),
      .rst_n    (rst_n),
      .req      (col_reqv[k]),
      .en       (col_en[k]),
      .rel      (in_rel),
      .cfg_we   (cfg_we && (cfg_col == MW'(k))),
      .cfg_inh (cfg_inh),
      .gnt      (col_gnt[k]),
      .busy     (col_busy[k]),
      .win      (col_win[k]),
      .inh      ()
    );
  end

  // Precharge-discharge data path and framing of the read buffers.
  always_comb begin
    for (int k = 0; k < M; k++) begin
      bitline[k]   = '1;
      nxt_valid[k] = 1'b0;
      nxt_last[k]  = 1'b0;
      nxt_src[k]   = '0;
      for (int i = 0; i < N; i++) begin
        if (col_gnt[k][i]) begin
          bitline[k] = bitline[k] & in_bus[i];
          if (in_valid[i]) begin
            nxt_valid[k] = 1'b1;
            nxt_last[k]  = in_rel[i];
          end
          nxt_src[k] = nxt_src[k] | SW'(i);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_last  <= '0;
      out_src   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= nxt_valid;
      out_last  <= nxt_last;
      for (int k = 0; k < M; k++)
        if (nxt_valid[k]) begin
          out_src[k]  <= nxt_src[k];
          out_data[k] <= bitline[k];
        end
    end
  end

endmodule
