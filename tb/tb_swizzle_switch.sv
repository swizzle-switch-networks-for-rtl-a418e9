// Self-checking testbench of swizzle_switch (5 inputs, 4 outputs, 16 bits).
//
// Five traffic drivers each pick a random (often multicast) output mask and a
// packet of 1-4 beats, request with the mask on their bus, send the beats to
// the outputs that granted (with random idle cycles in between), release with
// the last beat and request the rest of the mask again. An independent model
// of every column - its owner and a least-recently-granted rank list - gives
// the expected Granted flip-flops each cycle and the expected read-buffer
// contents (beat, source, last flag) one cycle after each beat is driven.
// Contention, multicast and partial multicast are counted and must occur.
module tb_swizzle_switch;

  localparam int N  = 5;
  localparam int M  = 4;
  localparam int W  = 16;
  localparam int SW = $clog2(N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0][W-1:0]  in_bus;
  logic [N-1:0]         in_req, in_valid, in_rel;
  logic [M-1:0]         col_en;
  logic [N-1:0][M-1:0]  gnt;
  logic [M-1:0]         col_req, col_busy, out_valid, out_last;
  logic [M-1:0][SW-1:0] out_src;
  logic [M-1:0][W-1:0]  out_data;

  swizzle_switch #(.N(N), .M(M), .W(W)) dut (
    .clk, .rst_n, .in_bus, .in_req, .in_valid, .in_rel, .col_en,
    .cfg_we(1'b0), .cfg_col('0), .cfg_inh('0),
    .gnt, .col_req, .col_busy, .out_valid, .out_last, .out_src, .out_data
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

  // drivers
  typedef enum int {D_IDLE, D_REQ, D_DATA} dstate_e;
  dstate_e     ds   [N];
  logic [M-1:0] dmask [N];   // outputs still to serve
  logic [M-1:0] dheld [N];   // outputs held for this pass
  int          dlen [N], dbeat [N], dpkt [N];

  // model
  int          owner [M];
  int          rank  [M][N];
  logic        e_valid [M], e_last [M];
  logic [SW-1:0] e_src [M];
  logic [W-1:0]  e_data [M];
  int n_contend = 0, n_multicast = 0, n_partial = 0, n_beats = 0, n_block = 0;

  function automatic logic [W-1:0] beat_word(int i, int p, int b);
    return W'({4'(i), 8'(p), 4'(b)});
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin
      ds[i] = D_IDLE; dmask[i] = '0; dheld[i] = '0; dlen[i] = 0; dbeat[i] = 0; dpkt[i] = 0;
    end
    for (int j = 0; j < M; j++) begin
      owner[j] = -1;
      for (int k = 0; k < N; k++) rank[j][k] = k;
      e_valid[j] = 1'b0; e_last[j] = 1'b0; e_src[j] = '0; e_data[j] = '0;
    end
    in_bus = '0; in_req = '0; in_valid = '0; in_rel = '0; col_en = '1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      // 1. compare with the model
      for (int j = 0; j < M; j++) begin
        for (int i = 0; i < N; i++)
          check(gnt[i][j] == (owner[j] == i), $sformatf("gnt[%0d][%0d] cyc %0d", i, j, cyc));
        check(col_busy[j] == (owner[j] >= 0), "col_busy");
        check(out_valid[j] == e_valid[j], $sformatf("out_valid[%0d] cyc %0d", j, cyc));
        if (e_valid[j]) begin
          check(out_data[j] == e_data[j], $sformatf("out_data[%0d] %h exp %h", j, out_data[j], e_data[j]));
          check(out_src[j] == e_src[j] && out_last[j] == e_last[j], "out_src/out_last");
        end
      end
      // 2. drivers react to the grant lines
      for (int i = 0; i < N; i++) begin
        if (ds[i] == D_REQ && gnt[i] != '0) begin
          dheld[i] = gnt[i];
          if ($countones(gnt[i]) > 1) n_multicast++;
          if (gnt[i] != dmask[i]) n_partial++;
          ds[i] = D_DATA; dbeat[i] = 0;
        end else if (ds[i] == D_IDLE && $urandom_range(0, 2) == 0) begin
          dmask[i] = M'($urandom_range(1, (1 << M) - 1));
          dlen[i] = $urandom_range(1, 4);
          dpkt[i]++;
          ds[i] = D_REQ;
        end
      end
      // 3. drive
      in_req = '0; in_valid = '0; in_rel = '0;
      for (int i = 0; i < N; i++) begin
        in_bus[i] = W'($urandom);
        if (ds[i] == D_REQ) begin
          in_req[i] = 1'b1;
          in_bus[i] = W'(dmask[i]) | (W'($urandom) & ~W'((1 << M) - 1));
        end else if (ds[i] == D_DATA && $urandom_range(0, 4) != 0) begin
          in_valid[i] = 1'b1;
          in_bus[i] = beat_word(i, dpkt[i], dbeat[i]);
          in_rel[i] = (dbeat[i] == dlen[i] - 1);
        end
      end
      col_en = '1;
      if ($urandom_range(0, 9) == 0) col_en = M'($urandom);
      // 4. model of the coming clock edge
      for (int j = 0; j < M; j++) begin
        e_valid[j] = 1'b0;
        e_last[j] = 1'b0;
        if (owner[j] >= 0) begin
          if (in_valid[owner[j]]) begin
            e_valid[j] = 1'b1;
            e_data[j] = in_bus[owner[j]];
            e_src[j] = SW'(owner[j]);
            e_last[j] = in_rel[owner[j]];
            n_beats++;
          end
          if (in_rel[owner[j]]) owner[j] = -1;
        end else begin
          int w, nreq, pos;
          w = -1; nreq = 0; pos = 0;
          for (int k = 0; k < N; k++) if (in_req[k] && in_bus[k][j]) nreq++;
          if (nreq > 1) n_contend++;
          if (!col_en[j] && nreq > 0) n_block++;
          if (col_en[j])
            for (int k = 0; k < N; k++)
              if (w < 0 && in_req[rank[j][k]] && in_bus[rank[j][k]][j]) begin
                w = rank[j][k]; pos = k;
              end
          if (w >= 0) begin
            owner[j] = w;
            for (int k = pos; k < N - 1; k++) rank[j][k] = rank[j][k + 1];
            rank[j][N - 1] = w;
          end
        end
      end
      // drivers advance after the beat
      for (int i = 0; i < N; i++)
        if (in_valid[i]) begin
          if (in_rel[i]) begin
            dmask[i] = dmask[i] & ~dheld[i];
            dheld[i] = '0;
            ds[i] = (dmask[i] == '0) ? D_IDLE : D_REQ;
          end else dbeat[i]++;
        end
    end
    $display("contention=%0d multicast=%0d partial=%0d beats=%0d blocked=%0d",
             n_contend, n_multicast, n_partial, n_beats, n_block);
    check(n_contend > 0 && n_multicast > 0 && n_partial > 0 && n_beats > 0 && n_block > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
