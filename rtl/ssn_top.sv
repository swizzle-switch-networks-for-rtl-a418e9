// Swizzle-Switch Network (SSN): a flat, single-hop interconnect for a
// 64-core cache-coherent chip with 32 shared L2 banks.
//
// Directory coherence needs three message classes - L1->L2 (requests,
// writebacks), L2->L1 (responses, invalidations) and L1->L1 (forwarded
// shared data); L2->L2 never occurs. Each class gets its own Swizzle-Switch:
//   u_l1l2  N_L1 x N_L2 x W   inputs: L1 ports, outputs: L2 ports
//   u_l2l1  N_L2 x N_L1 x W   inputs: L2 ports, outputs: L1 ports
//   u_l1l1  N_L1 x N_L1 x W   inputs: L1 ports, outputs: L1 ports
// An L1's send bus feeds both u_l1l2 and u_l1l1; a packet (flag l1_inj_to_l2)
// goes to L2 banks or to L1s, and its destination is a multi-hot mask, so
// invalidations and forwards can be multicast by driving the bus once. The
// two switches that reach the L1s are merged per L1 by l1_mux.
//
// Each send port has an ss_input_port (end-point buffer and switch protocol
// controller). Its buffer write is the wire into the switch; every switch
// output is followed by an ssn_pipe stage, the wire to the destination.
// A single-flit packet accepted at the edge ending cycle t thus arbitrates in
// t+1, crosses the switch in t+2, sits in the read buffer in t+3 and appears
// on the receive port (ej_valid) in t+4, with no contention. Multi-flit
// packets follow at one flit per cycle.
//
// Port counts, bus width, the three switches, the L1 mux and the four-cycle
// path follow the published design; the flit interface, the end-point buffer
// depth, the send/receive signalling and the priority load port are this
// design's choices. The priority of any switch column can be loaded through
// cfg_*; cfg_sel picks the switch (0: L1->L2, 1: L2->L1, 2: L1->L1).
module ssn_top
  import ssn_pkg::*;
#(
  parameter int unsigned N_L1  = SSN_N_L1,
  parameter int unsigned N_L2  = SSN_N_L2,
  parameter int unsigned W     = SSN_W,
  parameter int unsigned DEPTH = SSN_DEPTH,
  localparam int unsigned S1   = $clog2(N_L1),
  localparam int unsigned S2   = $clog2(N_L2)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // L1 send ports
  input  logic [N_L1-1:0]             l1_inj_valid,
  output logic [N_L1-1:0]             l1_inj_ready,
  input  logic [N_L1-1:0]             l1_inj_to_l2,
  input  logic [N_L1-1:0][N_L1-1:0]   l1_inj_dest,   // L2 banks in [N_L2-1:0] when to_l2
  input  logic [N_L1-1:0]             l1_inj_last,
  input  logic [N_L1-1:0][W-1:0]      l1_inj_data,
  // L2 send ports
  input  logic [N_L2-1:0]             l2_inj_valid,
  output logic [N_L2-1:0]             l2_inj_ready,
  input  logic [N_L2-1:0][N_L1-1:0]   l2_inj_dest,
  input  logic [N_L2-1:0]             l2_inj_last,
  input  logic [N_L2-1:0][W-1:0]      l2_inj_data,
  // L1 receive ports
  output logic [N_L1-1:0]             l1_ej_valid,
  output logic [N_L1-1:0]             l1_ej_last,
  output logic [N_L1-1:0]             l1_ej_from_l2,
  output logic [N_L1-1:0][S1-1:0]     l1_ej_src,
  output logic [N_L1-1:0][W-1:0]      l1_ej_data,
  // L2 receive ports
  output logic [N_L2-1:0]             l2_ej_valid,
  output logic [N_L2-1:0]             l2_ej_last,
  output logic [N_L2-1:0][S1-1:0]     l2_ej_src,
  output logic [N_L2-1:0][W-1:0]      l2_ej_data,
  // priority load
  input  logic                        cfg_we,
  input  logic [1:0]                  cfg_sel,
  input  logic [S1-1:0]               cfg_col,
  input  logic [N_L1-1:0][N_L1-1:0]   cfg_inh
);

  // ---------------------------------------------------------------- L1 send
  logic [N_L1-1:0][W-1:0]    l1_bus;
  logic [N_L1-1:0]           l1_req, l1_valid, l1_rel, l1_tag;
  logic [N_L1-1:0][N_L2-1:0] g_l1l2;   // grants of u_l1l2, per L1 row
  logic [N_L1-1:0][N_L1-1:0] g_l1l1;   // grants of u_l1l1, per L1 row

  for (genvar i = 0; i < N_L1; i++) begin : g_l1p
    logic [N_L1-1:0] dest, gnt;
    assign dest = l1_inj_to_l2[i] ? N_L1'(l1_inj_dest[i][N_L2-1:0]) : l1_inj_dest[i];
    assign gnt  = l1_tag[i] ? N_L1'(g_l1l2[i]) : g_l1l1[i];

    ss_input_port #(.M(N_L1), .W(W), .DEPTH(DEPTH), .TAGW(1)) u_port (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (l1_inj_valid[i]),
      .in_ready (l1_inj_ready[i]),
      .in_dest  (dest),
      .in_tag   (l1_inj_to_l2[i]),
      .in_last  (l1_inj_last[i]),
      .in_data  (l1_inj_data[i]),
      .bus      (l1_bus[i]),
      .req      (l1_req[i]),
      .valid    (l1_valid[i]),
      .rel      (l1_rel[i]),
      .cur_tag  (l1_tag[i]),
      .gnt      (gnt)
    );
  end

  // ---------------------------------------------------------------- L2 send
  logic [N_L2-1:0][W-1:0]    l2_bus;
  logic [N_L2-1:0]           l2_req, l2_valid, l2_rel;
  logic [N_L2-1:0][N_L1-1:0] g_l2l1;

  for (genvar b = 0; b < N_L2; b++) begin : g_l2p
    ss_input_port #(.M(N_L1), .W(W), .DEPTH(DEPTH), .TAGW(1)) u_port (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (l2_inj_valid[b]),
      .in_ready (l2_inj_ready[b]),
      .in_dest  (l2_inj_dest[b]),
      .in_tag   (1'b0),
      .in_last  (l2_inj_last[b]),
      .in_data  (l2_inj_data[b]),
      .bus      (l2_bus[b]),
      .req      (l2_req[b]),
      .valid    (l2_valid[b]),
      .rel      (l2_rel[b]),
      .cur_tag  (),
      .gnt      (g_l2l1[b])
    );
  end

  // ------------------------------------------------------------- switches
  logic [N_L2-1:0]           a2_valid, a2_last, a2_busy, a2_colreq;
  logic [N_L2-1:0][S1-1:0]   a2_src;
  logic [N_L2-1:0][W-1:0]    a2_data;

  swizzle_switch #(.N(N_L1), .M(N_L2), .W(W)) u_l1l2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_bus   (l1_bus),
    .in_req   (l1_req   &  l1_tag),
    .in_valid (l1_valid &  l1_tag),
    .in_rel   (l1_rel   &  l1_tag),
    .col_en   ('1),
    .cfg_we   (cfg_we && cfg_sel == 2'd0),
    .cfg_col  (S2'(cfg_col)),
    .cfg_inh (cfg_inh),
    .gnt      (g_l1l2),
    .col_req  (a2_colreq),
    .col_busy (a2_busy),
    .out_valid(a2_valid),
    .out_last (a2_last),
    .out_src  (a2_src),
    .out_data (a2_data)
  );

  logic [N_L1-1:0]           c_valid, c_last, c_busy, c_colreq, c_en;
  logic [N_L1-1:0][S1-1:0]   c_src;
  logic [N_L1-1:0][W-1:0]    c_data;

  swizzle_switch #(.N(N_L1), .M(N_L1), .W(W)) u_l1l1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_bus   (l1_bus),
    .in_req   (l1_req   & ~l1_tag),
    .in_valid (l1_valid & ~l1_tag),
    .in_rel   (l1_rel   & ~l1_tag),
    .col_en   (c_en),
    .cfg_we   (cfg_we && cfg_sel == 2'd2),
    .cfg_col  (cfg_col),
    .cfg_inh (cfg_inh),
    .gnt      (g_l1l1),
    .col_req  (c_colreq),
    .col_busy (c_busy),
    .out_valid(c_valid),
    .out_last (c_last),
    .out_src  (c_src),
    .out_data (c_data)
  );

  logic [N_L1-1:0]           r_valid, r_last, r_busy, r_colreq, r_en;
  logic [N_L1-1:0][S2-1:0]   r_src;
  logic [N_L1-1:0][W-1:0]    r_data;
  logic [N_L2-1:0][N_L2-1:0] cfg_inh2;

  for (genvar i = 0; i < N_L2; i++) begin : g_cfg2
    assign cfg_inh2[i] = cfg_inh[i][N_L2-1:0];
  end

  swizzle_switch #(.N(N_L2), .M(N_L1), .W(W)) u_l2l1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_bus   (l2_bus),
    .in_req   (l2_req),
    .in_valid (l2_valid),
    .in_rel   (l2_rel),
    .col_en   (r_en),
    .cfg_we   (cfg_we && cfg_sel == 2'd1),
    .cfg_col  (cfg_col),
    .cfg_inh (cfg_inh2),
    .gnt      (g_l2l1),
    .col_req  (r_colreq),
    .col_busy (r_busy),
    .out_valid(r_valid),
    .out_last (r_last),
    .out_src  (r_src),
    .out_data (r_data)
  );

  // ------------------------------------------------------------- L1 mux
  logic [N_L1-1:0]         m_valid, m_last, m_from_l2;
  logic [N_L1-1:0][S1-1:0] m_src;
  logic [N_L1-1:0][W-1:0]  m_data;

  l1_mux #(.N_L1(N_L1), .W(W), .SWA(S1), .SWB(S2)) u_l1_mux (
    .clk      (clk),
    .rst_n    (rst_n),
    .a_req    (c_colreq),
    .a_busy   (c_busy),
    .b_req    (r_colreq),
    .b_busy   (r_busy),
    .a_en     (c_en),
    .b_en     (r_en),
    .a_valid  (c_valid),
    .a_last   (c_last),
    .a_src    (c_src),
    .a_data   (c_data),
    .b_valid  (r_valid),
    .b_last   (r_last),
    .b_src    (r_src),
    .b_data   (r_data),
    .y_valid  (m_valid),
    .y_last   (m_last),
    .y_from_b (m_from_l2),
    .y_src    (m_src),
    .y_data   (m_data)
  );

  // ------------------------------------------------- wires to destinations
  for (genvar j = 0; j < N_L1; j++) begin : g_l1ej
    ssn_pipe #(.WIDTH(W + S1 + 2)) u_pipe (
      .clk     (clk),
      .rst_n   (rst_n),
      .d_valid (m_valid[j]),
      .d       ({m_last[j], m_from_l2[j], m_src[j], m_data[j]}),
      .q_valid (l1_ej_valid[j]),
      .q       ({l1_ej_last[j], l1_ej_from_l2[j], l1_ej_src[j], l1_ej_data[j]})
    );
  end

  for (genvar b = 0; b < N_L2; b++) begin : g_l2ej
    ssn_pipe #(.WIDTH(W + S1 + 1)) u_pipe (
      .clk     (clk),
      .rst_n   (rst_n),
      .d_valid (a2_valid[b]),
      .d       ({a2_last[b], a2_src[b], a2_data[b]}),
      .q_valid (l2_ej_valid[b]),
      .q       ({l2_ej_last[b], l2_ej_src[b], l2_ej_data[b]})
    );
  end

endmodule
