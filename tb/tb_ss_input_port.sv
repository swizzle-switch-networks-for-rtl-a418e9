// Self-checking testbench of ss_input_port (4 outputs, 16 bits, 4 flits).
//
// The testbench plays the switch: when the port requests, it grants a random
// subset of the requested outputs in the next cycle (sometimes none), keeps
// the grant while beats flow and drops it after the beat with 'rel'. Random
// packets of 1-4 flits with random multicast masks are injected with random
// gaps. Every output has a queue of the beats it must receive; each beat the
// port drives is checked against the queue of every output granted at that
// time, so each destination must get every packet exactly once, in order.
// Protocol rules (request and data never together, request mask within the
// packet's remaining mask, release only with a beat) and the latency of an
// idle port (request one cycle after the flit is accepted, first beat the
// cycle after the grant) are checked. Backpressure, partial grants and
// replays must occur.
module tb_ss_input_port;

  localparam int M = 4;
  localparam int W = 16;
  localparam int D = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           in_valid, in_ready, in_last;
  logic [M-1:0]   in_dest, gnt;
  logic [W-1:0]   in_data, bus;
  logic           req, valid, rel;
  logic [0:0]     cur_tag;

  ss_input_port #(.M(M), .W(W), .DEPTH(D), .TAGW(1)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_dest, .in_tag(1'b0), .in_last, .in_data,
    .bus, .req, .valid, .rel, .cur_tag, .gnt
  );

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  logic [W-1:0] expq [M][$];
  logic [M-1:0] gnt_next, pkt_mask;
  int           pkt_len, pkt_sent, pkt_no;
  int           n_bp = 0, n_partial = 0, n_replay = 0, n_nogrant = 0, n_stall = 0, n_beats = 0;
  logic [M-1:0] last_req_mask;
  bit           directed;

  initial begin
    in_valid = 1'b0; in_last = 1'b0; in_dest = '0; in_data = '0; gnt = '0;
    gnt_next = '0; pkt_len = 0; pkt_sent = 0; pkt_no = 0; last_req_mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // ---- directed: latency of a single-flit unicast on an idle port
    @(negedge clk);
    in_valid = 1'b1; in_dest = 4'b0100; in_last = 1'b1; in_data = 16'hBEEF;
    #1 check(in_ready && !req, "idle and ready");
    @(negedge clk);
    in_valid = 1'b0;
    #1 check(req && bus[M-1:0] == 4'b0100 && !valid, "request one cycle after accept");
    @(negedge clk);
    gnt = 4'b0100;
    #1 check(valid && rel && bus == 16'hBEEF && !req, "beat in the cycle after the grant");
    @(negedge clk);
    gnt = '0;
    #1 check(!req && !valid && in_ready, "port idle again");

    // ---- random
    for (int cyc = 0; cyc < 8000; cyc++) begin
      @(negedge clk);
      gnt = gnt_next;
      // injection
      if (pkt_sent == pkt_len) begin
        pkt_len = $urandom_range(1, D);
        pkt_sent = 0;
        pkt_mask = M'($urandom_range(1, (1 << M) - 1));
        pkt_no++;
      end
      in_valid = ($urandom_range(0, 2) != 0);
      in_dest = (pkt_sent == 0) ? pkt_mask : M'($urandom);  // only the first flit's mask counts
      in_last = (pkt_sent == pkt_len - 1);
      in_data = W'({8'(pkt_no), 4'(pkt_sent), 4'($urandom)});
      #1;
      if (in_valid && !in_ready) n_bp++;
      // switch side
      check(!(req && valid), "request and data together");
      check(!rel || valid, "release without beat");
      gnt_next = gnt;
      if (valid) begin
        n_beats++;
        check(gnt != '0, "beat without grant");
        for (int j = 0; j < M; j++)
          if (gnt[j]) begin
            if (expq[j].size() == 0) check(1'b0, $sformatf("unexpected beat at %0d", j));
            else check(bus == expq[j].pop_front(), $sformatf("beat at output %0d", j));
          end
        if (rel) gnt_next = '0;
      end else if (gnt != '0) begin
        n_stall++;
      end
      if (req) begin
        check(gnt == '0, "request while holding");
        if (bus[M-1:0] != last_req_mask && last_req_mask != '0) n_replay++;
        last_req_mask = bus[M-1:0];
        gnt_next = bus[M-1:0] & M'($urandom);
        if ($urandom_range(0, 3) == 0) gnt_next = bus[M-1:0];
        if (gnt_next == '0) n_nogrant++;
        else if (gnt_next != bus[M-1:0]) n_partial++;
      end
      if (!req && !valid && gnt == '0) last_req_mask = '0;
      if (in_valid && in_ready) begin
        for (int j = 0; j < M; j++) if (pkt_mask[j]) expq[j].push_back(in_data);
        pkt_sent++;
      end
    end
    // finish the packet in flight, then drain: every queue must empty
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      gnt = gnt_next;
      in_valid = (pkt_sent < pkt_len);
      in_dest = pkt_mask;
      in_last = (pkt_sent == pkt_len - 1);
      in_data = W'({8'(pkt_no), 4'(pkt_sent), 4'($urandom)});
      #1;
      gnt_next = gnt;
      if (valid) begin
        for (int j = 0; j < M; j++)
          if (gnt[j]) begin
            if (expq[j].size() == 0) check(1'b0, "unexpected drain beat");
            else check(bus == expq[j].pop_front(), "drain beat");
          end
        if (rel) gnt_next = '0;
      end
      if (req) gnt_next = bus[M-1:0];
      if (in_valid && in_ready) begin
        for (int j = 0; j < M; j++) if (pkt_mask[j]) expq[j].push_back(in_data);
        pkt_sent++;
      end
    end
    directed = 1'b1;
    for (int j = 0; j < M; j++)
      if (expq[j].size() != 0) directed = 1'b0;
    check(directed, "all packets delivered to every destination");
    $display("backpressure=%0d partial=%0d replay=%0d nogrant=%0d stall=%0d beats=%0d",
             n_bp, n_partial, n_replay, n_nogrant, n_stall, n_beats);
    check(n_bp > 0 && n_partial > 0 && n_replay > 0 && n_nogrant > 0 && n_stall > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
