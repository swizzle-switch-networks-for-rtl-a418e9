// End-to-end testbench of ssn_top at reduced size (8 L1 ports, 4 L2 banks,
// 16-bit buses, 4-flit end-point buffers).
//
// Directed part: on the idle network, a single-flit packet on each of the
// three paths (L1->L2, L2->L1, L1->L1 multicast) must reach every destination
// exactly four cycles after it is accepted.
// Random part: every L1 sends requests (1-4 flits) to one L2 bank or
// forwards (unicast or multicast) to L1s; every L2 bank sends responses or
// multicast invalidations to L1s. Each receive port keeps one queue of
// expected flits per source; a delivered flit must match the head of its
// source's queue (data and last flag), and packets must arrive unbroken.
// After a drain all queues must be empty.
// Mechanisms counted, each must occur: column contention in a switch,
// multicast, a partial multicast grant followed by a replay, send-port
// backpressure, an L1-mux block of a column held by the other switch, an
// L1-mux tie between the two switches, and multi-flit packets.
module tb_ssn_top;

  localparam int NL1 = 8;
  localparam int NL2 = 4;
  localparam int W   = 16;
  localparam int DP  = 4;
  localparam int S1  = $clog2(NL1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NL1-1:0]           l1_inj_valid, l1_inj_ready, l1_inj_to_l2, l1_inj_last;
  logic [NL1-1:0][NL1-1:0]  l1_inj_dest;
  logic [NL1-1:0][W-1:0]    l1_inj_data;
  logic [NL2-1:0]           l2_inj_valid, l2_inj_ready, l2_inj_last;
  logic [NL2-1:0][NL1-1:0]  l2_inj_dest;
  logic [NL2-1:0][W-1:0]    l2_inj_data;
  logic [NL1-1:0]           l1_ej_valid, l1_ej_last, l1_ej_from_l2;
  logic [NL1-1:0][S1-1:0]   l1_ej_src;
  logic [NL1-1:0][W-1:0]    l1_ej_data;
  logic [NL2-1:0]           l2_ej_valid, l2_ej_last;
  logic [NL2-1:0][S1-1:0]   l2_ej_src;
  logic [NL2-1:0][W-1:0]    l2_ej_data;

  ssn_top #(.N_L1(NL1), .N_L2(NL2), .W(W), .DEPTH(DP)) dut (
    .clk, .rst_n,
    .l1_inj_valid, .l1_inj_ready, .l1_inj_to_l2, .l1_inj_dest, .l1_inj_last, .l1_inj_data,
    .l2_inj_valid, .l2_inj_ready, .l2_inj_dest, .l2_inj_last, .l2_inj_data,
    .l1_ej_valid, .l1_ej_last, .l1_ej_from_l2, .l1_ej_src, .l1_ej_data,
    .l2_ej_valid, .l2_ej_last, .l2_ej_src, .l2_ej_data,
    .cfg_we(1'b0), .cfg_sel(2'd0), .cfg_col('0), .cfg_inh('0)
  );

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // expected flits {last, data}: L1 receivers per (kind of source, source)
  logic [W:0] q1 [NL1][2][NL1][$];
  logic [W:0] q2 [NL2][NL1][$];
  int  cur1 [NL1];   // source key of the packet arriving at an L1, -1 none
  int  cur2 [NL2];
  int  cyc = 0;

  // injector state
  int           l1_left [NL1], l2_left [NL2];
  logic         l1_cls  [NL1];
  logic [NL1-1:0] l1_mask [NL1], l2_mask [NL2];

  int n_contend = 0, n_mcast = 0, n_partial = 0, n_bp = 0, n_block = 0, n_tie = 0,
      n_multi = 0, n_recv = 0;
  logic [NL1-1:0][NL1-1:0] prev_req1;   // L1 row request masks of last cycle
  logic [NL1-1:0]          prev_tag1;
  logic [NL2-1:0][NL1-1:0] prev_req2;

  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------- receivers
  always @(negedge clk) if (rst_n) begin
    for (int j = 0; j < NL1; j++)
      if (l1_ej_valid[j]) begin
        int k, s;
        k = l1_ej_from_l2[j];
        s = int'(l1_ej_src[j]);
        n_recv++;
        if (cur1[j] >= 0) check(cur1[j] == k * NL1 + s, $sformatf("L1 %0d packet interleaved", j));
        if (q1[j][k][s].size() == 0) check(1'b0, $sformatf("L1 %0d unexpected flit from %0d/%0d", j, k, s));
        else check(q1[j][k][s].pop_front() == {l1_ej_last[j], l1_ej_data[j]},
                   $sformatf("L1 %0d flit from %0d/%0d", j, k, s));
        cur1[j] = l1_ej_last[j] ? -1 : k * NL1 + s;
      end
    for (int b = 0; b < NL2; b++)
      if (l2_ej_valid[b]) begin
        int s;
        s = int'(l2_ej_src[b]);
        n_recv++;
        if (cur2[b] >= 0) check(cur2[b] == s, $sformatf("L2 %0d packet interleaved", b));
        if (q2[b][s].size() == 0) check(1'b0, $sformatf("L2 %0d unexpected flit from %0d", b, s));
        else check(q2[b][s].pop_front() == {l2_ej_last[b], l2_ej_data[b]},
                   $sformatf("L2 %0d flit from %0d", b, s));
        cur2[b] = l2_ej_last[b] ? -1 : s;
      end
  end

  // ---------------------------------------------------------- mechanism counters
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < NL1; k++) begin
      if ($countones(dut.u_l1l1.col_reqv[k]) > 1 || $countones(dut.u_l2l1.col_reqv[k]) > 1) n_contend++;
      if ((!dut.c_en[k] && dut.c_colreq[k] && !dut.c_busy[k]) ||
          (!dut.r_en[k] && dut.r_colreq[k] && !dut.r_busy[k])) n_block++;
      if (dut.c_colreq[k] && dut.r_colreq[k] && !dut.c_busy[k] && !dut.r_busy[k]) n_tie++;
    end
    for (int k = 0; k < NL2; k++)
      if ($countones(dut.u_l1l2.col_reqv[k]) > 1) n_contend++;
    // partial multicast grant: the row won some but not all requested columns
    for (int i = 0; i < NL1; i++) begin
      logic [NL1-1:0] g;
      g = prev_tag1[i] ? NL1'(dut.g_l1l2[i]) : dut.g_l1l1[i];
      if (prev_req1[i] != '0 && g != '0 && g != prev_req1[i]) n_partial++;
      prev_req1[i] = dut.l1_req[i] ? dut.l1_bus[i][NL1-1:0] : '0;
      prev_tag1[i] = dut.l1_tag[i];
    end
    for (int b = 0; b < NL2; b++) begin
      if (prev_req2[b] != '0 && dut.g_l2l1[b] != '0 && dut.g_l2l1[b] != prev_req2[b]) n_partial++;
      prev_req2[b] = dut.l2_req[b] ? dut.l2_bus[b][NL1-1:0] : '0;
    end
  end

  // push the expectations of an accepted L1 flit
  task automatic expect_l1(int i);
    if (l1_inj_to_l2[i]) begin
      for (int b = 0; b < NL2; b++)
        if (l1_mask[i][b]) q2[b][i].push_back({l1_inj_last[i], l1_inj_data[i]});
    end else begin
      for (int j = 0; j < NL1; j++)
        if (l1_mask[i][j]) q1[j][0][i].push_back({l1_inj_last[i], l1_inj_data[i]});
    end
  endtask

  task automatic expect_l2(int b);
    for (int j = 0; j < NL1; j++)
      if (l2_mask[b][j]) q1[j][1][b].push_back({l2_inj_last[b], l2_inj_data[b]});
  endtask

  function automatic int total_pending();
    int t = 0;
    for (int j = 0; j < NL1; j++)
      for (int k = 0; k < 2; k++)
        for (int s = 0; s < NL1; s++) t += q1[j][k][s].size();
    for (int b = 0; b < NL2; b++)
      for (int s = 0; s < NL1; s++) t += q2[b][s].size();
    return t;
  endfunction

  initial begin
    int t0;
    l1_inj_valid = '0; l1_inj_to_l2 = '0; l1_inj_dest = '0; l1_inj_last = '0; l1_inj_data = '0;
    l2_inj_valid = '0; l2_inj_dest = '0; l2_inj_last = '0; l2_inj_data = '0;
    prev_req1 = '0; prev_tag1 = '0; prev_req2 = '0;
    for (int j = 0; j < NL1; j++) begin cur1[j] = -1; l1_left[j] = 0; end
    for (int b = 0; b < NL2; b++) begin cur2[b] = -1; l2_left[b] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // ------------------------------------------------ directed latency
    // L1 0 -> L2 1, L2 2 -> L1 3, L1 5 -> L1 {1,6}, all accepted in one cycle
    l1_inj_valid[0] = 1'b1; l1_inj_to_l2[0] = 1'b1; l1_inj_dest[0] = NL1'(2);
    l1_inj_last[0] = 1'b1; l1_inj_data[0] = 16'h1111; l1_mask[0] = NL1'(2);
    l2_inj_valid[2] = 1'b1; l2_inj_dest[2] = NL1'(8); l2_inj_last[2] = 1'b1;
    l2_inj_data[2] = 16'h2222; l2_mask[2] = NL1'(8);
    l1_inj_valid[5] = 1'b1; l1_inj_to_l2[5] = 1'b0; l1_inj_dest[5] = NL1'(8'b0100_0010);
    l1_inj_last[5] = 1'b1; l1_inj_data[5] = 16'h5555; l1_mask[5] = NL1'(8'b0100_0010);
    #1;
    check(l1_inj_ready[0] && l2_inj_ready[2] && l1_inj_ready[5], "ready when idle");
    expect_l1(0); expect_l2(2); expect_l1(5);
    t0 = cyc;
    @(negedge clk);
    l1_inj_valid = '0; l2_inj_valid = '0;
    repeat (3) begin
      #1 check(l1_ej_valid == '0 && l2_ej_valid == '0, "nothing before four cycles");
      @(negedge clk);
    end
    check(cyc - t0 == 4, "cycle count");
    check(l2_ej_valid == 4'b0010 && l2_ej_data[1] == 16'h1111 && l2_ej_src[1] == 0, "L1->L2 in 4 cycles");
    check(l1_ej_valid == 8'b0100_1010, "L2->L1 and L1->L1 multicast in 4 cycles");
    check(l1_ej_from_l2[3] && l1_ej_data[3] == 16'h2222 && l1_ej_src[3] == 2, "L2->L1 flit");
    check(!l1_ej_from_l2[1] && l1_ej_data[1] == 16'h5555 && l1_ej_data[6] == 16'h5555, "multicast flit");
    n_mcast++;
    repeat (2) @(negedge clk);
    check(total_pending() == 0, "directed flits all delivered");

    // ------------------------------------------------ random traffic
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int i = 0; i < NL1; i++) begin
        if (l1_left[i] == 0 && $urandom_range(0, 3) == 0) begin
          l1_left[i] = $urandom_range(1, DP);
          if (l1_left[i] > 1) n_multi++;
          l1_cls[i] = 1'($urandom);
          if (l1_cls[i]) l1_mask[i] = NL1'(1) << $urandom_range(0, NL2 - 1);
          else if ($urandom_range(0, 2) == 0) l1_mask[i] = NL1'($urandom_range(1, (1 << NL1) - 1));
          else l1_mask[i] = NL1'(1) << $urandom_range(0, NL1 - 1);
          if ($countones(l1_mask[i]) > 1) n_mcast++;
        end
        l1_inj_valid[i] = (l1_left[i] > 0) && ($urandom_range(0, 3) != 0);
        l1_inj_to_l2[i] = l1_cls[i];
        l1_inj_dest[i] = l1_mask[i] | (l1_cls[i] ? (NL1'($urandom) & ~NL1'((1 << NL2) - 1)) : '0);
        l1_inj_last[i] = (l1_left[i] == 1);
        l1_inj_data[i] = W'($urandom);
      end
      for (int b = 0; b < NL2; b++) begin
        if (l2_left[b] == 0 && $urandom_range(0, 3) == 0) begin
          l2_left[b] = $urandom_range(1, DP);
          if ($urandom_range(0, 3) == 0) l2_mask[b] = NL1'($urandom_range(1, (1 << NL1) - 1));
          else l2_mask[b] = NL1'(1) << $urandom_range(0, NL1 - 1);
          if ($countones(l2_mask[b]) > 1) n_mcast++;
        end
        l2_inj_valid[b] = (l2_left[b] > 0) && ($urandom_range(0, 3) != 0);
        l2_inj_dest[b] = l2_mask[b];
        l2_inj_last[b] = (l2_left[b] == 1);
        l2_inj_data[b] = W'($urandom);
      end
      #1;
      for (int i = 0; i < NL1; i++) begin
        if (l1_inj_valid[i] && !l1_inj_ready[i]) n_bp++;
        if (l1_inj_valid[i] && l1_inj_ready[i]) begin expect_l1(i); l1_left[i]--; end
      end
      for (int b = 0; b < NL2; b++) begin
        if (l2_inj_valid[b] && !l2_inj_ready[b]) n_bp++;
        if (l2_inj_valid[b] && l2_inj_ready[b]) begin expect_l2(b); l2_left[b]--; end
      end
    end
    // finish the packets in flight, then drain
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      for (int i = 0; i < NL1; i++) begin
        l1_inj_valid[i] = (l1_left[i] > 0);
        l1_inj_last[i] = (l1_left[i] == 1);
        l1_inj_data[i] = W'($urandom);
      end
      for (int b = 0; b < NL2; b++) begin
        l2_inj_valid[b] = (l2_left[b] > 0);
        l2_inj_last[b] = (l2_left[b] == 1);
        l2_inj_data[b] = W'($urandom);
      end
      #1;
      for (int i = 0; i < NL1; i++)
        if (l1_inj_valid[i] && l1_inj_ready[i]) begin expect_l1(i); l1_left[i]--; end
      for (int b = 0; b < NL2; b++)
        if (l2_inj_valid[b] && l2_inj_ready[b]) begin expect_l2(b); l2_left[b]--; end
    end
    check(total_pending() == 0, $sformatf("all flits delivered (%0d left)", total_pending()));
    $display("received=%0d contention=%0d multicast=%0d partial=%0d backpressure=%0d mux_block=%0d mux_tie=%0d multiflit=%0d",
             n_recv, n_contend, n_mcast, n_partial, n_bp, n_block, n_tie, n_multi);
    check(n_contend > 0, "contention happened");
    check(n_mcast > 0,   "multicast happened");
    check(n_partial > 0, "partial multicast grant happened");
    check(n_bp > 0,      "backpressure happened");
    check(n_block > 0,   "L1 mux block happened");
    check(n_tie > 0,     "L1 mux tie happened");
    check(n_multi > 0,   "multi-flit packets happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
