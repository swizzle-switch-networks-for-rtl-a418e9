// Synthetic-traffic testbench of ssn_top: the fairness experiment run on the
// L1->L1 switch of a 16-port network (16-bit flits, single-flit packets).
//
// Phase 1, hotspot: every L1 offers 0.05 flit/cycle (Bernoulli, unbounded
//   source queue) to one hotspot L1. The hotspot column is oversubscribed
//   (one single-flit packet every two cycles: arbitration, then data), so
//   every source is saturated and least-recently-granted arbitration must
//   share the column evenly: the accepted counts per source may differ by at
//   most 5 % (sources start saturated at slightly different times), and the
//   column must be busy at its full rate.
// Phase 2, uniform random: every L1 offers 1 flit/cycle to uniformly chosen
//   other L1s; the accepted counts per source must be within 20 % of each
//   other.
// Each delivered flit is also checked against its source's expected stream.
module tb_ssn_traffic;

  localparam int NL1 = 16;
  localparam int NL2 = 4;
  localparam int W   = 16;
  localparam int S1  = $clog2(NL1);
  localparam int HOT = 9;
  localparam int T1  = 4000;
  localparam int T2  = 4000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NL1-1:0]           l1_inj_valid, l1_inj_ready, l1_inj_to_l2, l1_inj_last;
  logic [NL1-1:0][NL1-1:0]  l1_inj_dest;
  logic [NL1-1:0][W-1:0]    l1_inj_data;
  logic [NL2-1:0]           l2_inj_ready, l2_ej_valid, l2_ej_last;
  logic [NL1-1:0]           l1_ej_valid, l1_ej_last, l1_ej_from_l2;
  logic [NL1-1:0][S1-1:0]   l1_ej_src;
  logic [NL1-1:0][W-1:0]    l1_ej_data;
  logic [NL2-1:0][S1-1:0]   l2_ej_src;
  logic [NL2-1:0][W-1:0]    l2_ej_data;

  ssn_top #(.N_L1(NL1), .N_L2(NL2), .W(W), .DEPTH(8)) dut (
    .clk, .rst_n,
    .l1_inj_valid, .l1_inj_ready, .l1_inj_to_l2, .l1_inj_dest, .l1_inj_last, .l1_inj_data,
    .l2_inj_valid('0), .l2_inj_ready, .l2_inj_dest('0), .l2_inj_last('0), .l2_inj_data('0),
    .l1_ej_valid, .l1_ej_last, .l1_ej_from_l2, .l1_ej_src, .l1_ej_data,
    .l2_ej_valid, .l2_ej_last, .l2_ej_src, .l2_ej_data,
    .cfg_we(1'b0), .cfg_sel(2'd0), .cfg_col('0), .cfg_inh('0)
  );

  initial begin : watchdog
    repeat (T1 + T2 + 2000) @(posedge clk);
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

  logic [W-1:0] expq [NL1][NL1][$];   // [dest][src]
  int  backlog [NL1];                  // flits waiting in the source queue
  int  seq [NL1];
  int  accepted [NL1];
  int  delivered_hot;
  bit  counting;
  int  dest_now [NL1];

  always @(negedge clk) if (rst_n)
    for (int j = 0; j < NL1; j++)
      if (l1_ej_valid[j]) begin
        int s;
        s = int'(l1_ej_src[j]);
        if (expq[j][s].size() == 0) check(1'b0, "unexpected flit");
        else check(expq[j][s].pop_front() == l1_ej_data[j] && l1_ej_last[j] && !l1_ej_from_l2[j],
                   $sformatf("flit %0d->%0d", s, j));
        if (counting) accepted[s]++;
        if (counting && j == HOT) delivered_hot++;
      end

  task automatic run_phase(input bit hotspot, input int cycles);
    for (int i = 0; i < NL1; i++) begin accepted[i] = 0; backlog[i] = 0; dest_now[i] = -1; end
    delivered_hot = 0;
    counting = 1'b1;
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      for (int i = 0; i < NL1; i++) begin
        if (hotspot) begin
          if (i != HOT && $urandom_range(0, 99) < 5) backlog[i]++;
        end else backlog[i] = 1;
        if (dest_now[i] < 0 && backlog[i] > 0) begin
          if (hotspot) dest_now[i] = HOT;
          else begin
            dest_now[i] = $urandom_range(0, NL1 - 2);
            if (dest_now[i] >= i) dest_now[i]++;
          end
        end
        l1_inj_valid[i] = (dest_now[i] >= 0);
        l1_inj_dest[i] = (dest_now[i] >= 0) ? (NL1'(1) << dest_now[i]) : '0;
        l1_inj_data[i] = W'({4'(i), 12'(seq[i])});
      end
      #1;
      for (int i = 0; i < NL1; i++)
        if (l1_inj_valid[i] && l1_inj_ready[i]) begin
          expq[dest_now[i]][i].push_back(l1_inj_data[i]);
          seq[i]++;
          backlog[i]--;
          dest_now[i] = -1;
        end
    end
    counting = 1'b0;
    l1_inj_valid = '0;
    repeat (200) @(negedge clk);
  endtask

  initial begin
    int mn, mx;
    l1_inj_valid = '0; l1_inj_to_l2 = '0; l1_inj_last = '1; l1_inj_dest = '0; l1_inj_data = '0;
    counting = 1'b0;
    for (int i = 0; i < NL1; i++) seq[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    run_phase(1'b1, T1);
    mn = 1 << 30; mx = 0;
    for (int i = 0; i < NL1; i++) if (i != HOT) begin
      if (accepted[i] < mn) mn = accepted[i];
      if (accepted[i] > mx) mx = accepted[i];
    end
    $display("hotspot: delivered %0d flits in %0d cycles, per source min %0d max %0d",
             delivered_hot, T1, mn, mx);
    check(mx - mn <= mx / 20 + 2, "hotspot: equal share per source (within 5 %)");
    check(delivered_hot >= T1 / 2 - 20, "hotspot: column serves a packet every two cycles");

    run_phase(1'b0, T2);
    mn = 1 << 30; mx = 0;
    for (int i = 0; i < NL1; i++) begin
      if (accepted[i] < mn) mn = accepted[i];
      if (accepted[i] > mx) mx = accepted[i];
    end
    $display("uniform: per source min %0d max %0d flits in %0d cycles", mn, mx, T2);
    check(mn > 0 && mx * 10 <= mn * 12, "uniform: share per source within 20 %");

    for (int j = 0; j < NL1; j++)
      for (int i = 0; i < NL1; i++)
        check(expq[j][i].size() == 0, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
