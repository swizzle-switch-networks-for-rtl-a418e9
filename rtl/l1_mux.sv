// L1 mux: merges the two switches that deliver to the L1 caches - the
// L1->L1 switch ('a', shared-data forwarding) and the L2->L1 switch ('b',
// responses and invalidations) - onto one receive port per L1.
//
// Each L1 column exists in both switches. The mux keeps a column connected
// in at most one of them: while a column is in data-transmission mode in one
// switch, the other switch's column may not arbitrate, and when both switches
// request a free column in the same cycle the one that was not granted it
// last time wins (a per-column two-way least-recently-granted choice). Since
// the two read buffers of a column can then never hold beats in the same
// cycle, the receive port simply takes whichever is valid; y_from_b tells the
// receiver which switch delivered it.
//
// The block and its place between the two switches are those of the
// published floorplan; what it does is not described there, and this
// column interlock is this design's choice. All paths are combinational
// except the per-column preference bit.
module l1_mux #(
  parameter int unsigned N_L1 = 64,
  parameter int unsigned W    = 128,
  parameter int unsigned SWA  = 6,   // source index width, switch a
  parameter int unsigned SWB  = 5    // source index width, switch b
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // column status and enables
  input  logic [N_L1-1:0]         a_req,
  input  logic [N_L1-1:0]         a_busy,
  input  logic [N_L1-1:0]         b_req,
  input  logic [N_L1-1:0]         b_busy,
  output logic [N_L1-1:0]         a_en,
  output logic [N_L1-1:0]         b_en,
  // read buffers
  input  logic [N_L1-1:0]         a_valid,
  input  logic [N_L1-1:0]         a_last,
  input  logic [N_L1-1:0][SWA-1:0] a_src,
  input  logic [N_L1-1:0][W-1:0]  a_data,
  input  logic [N_L1-1:0]         b_valid,
  input  logic [N_L1-1:0]         b_last,
  input  logic [N_L1-1:0][SWB-1:0] b_src,
  input  logic [N_L1-1:0][W-1:0]  b_data,
  // merged receive ports
  output logic [N_L1-1:0]         y_valid,
  output logic [N_L1-1:0]         y_last,
  output logic [N_L1-1:0]         y_from_b,
  output logic [N_L1-1:0][SWA-1:0] y_src,
  output logic [N_L1-1:0][W-1:0]  y_data
);

  localparam int unsigned SWY = SWA;

  logic [N_L1-1:0] prefer_b;   // b wins the next same-cycle tie
  logic [N_L1-1:0] a_grant, b_grant;

  always_comb begin
    for (int j = 0; j < N_L1; j++) begin
      a_en[j]    = !b_busy[j] && !(b_req[j] &&  prefer_b[j]);
      b_en[j]    = !a_busy[j] && !(a_req[j] && !prefer_b[j]);
      a_grant[j] = a_req[j] && a_en[j] && !a_busy[j];
      b_grant[j] = b_req[j] && b_en[j] && !b_busy[j];

      y_valid[j]  = a_valid[j] || b_valid[j];
      y_from_b[j] = b_valid[j];
      y_last[j]   = b_valid[j] ? b_last[j] : a_last[j];
      y_src[j]    = b_valid[j] ? SWY'(b_src[j]) : SWY'(a_src[j]);
      y_data[j]   = b_valid[j] ? b_data[j] : a_data[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prefer_b <= '1;
    else
      for (int j = 0; j < N_L1; j++) begin
        if (a_grant[j])      prefer_b[j] <= 1'b1;
        else if (b_grant[j]) prefer_b[j] <= 1'b0;
      end
  end

  a_one_source: assert property (@(posedge clk) disable iff (!rst_n) (a_valid & b_valid) == '0);
  a_one_grant:  assert property (@(posedge clk) disable iff (!rst_n) (a_grant & b_grant) == '0);

endmodule
