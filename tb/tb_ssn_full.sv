// Full-size testbench of ssn_top (64 L1 ports, 32 L2 banks, 128-bit buses,
// default parameters). It walks one coherence transaction through all three
// switches:
//   1. L1 7 sends a one-flit read request to L2 bank 20 (L1->L2 switch);
//   2. bank 20 answers with a 64-byte line, four 128-bit flits, to L1 7
//      (L2->L1 switch), and in the same cycle L1 40 forwards a four-flit line
//      to L1 7 as well (L1->L1 switch), so both meet at L1 7's L1 mux;
//   3. bank 20 multicasts a one-flit invalidation to L1s 3, 40 and 63.
// Every flit is checked for data, source, switch flag and last flag; the
// request and the invalidation must arrive exactly four cycles after they are
// accepted, and the two competing lines must arrive unbroken, one after the
// other, one flit per cycle.
module tb_ssn_full;

  import ssn_pkg::*;

  localparam int NL1 = SSN_N_L1;
  localparam int NL2 = SSN_N_L2;
  localparam int W   = SSN_W;
  localparam int S1  = $clog2(NL1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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

  ssn_top dut (
    .clk, .rst_n,
    .l1_inj_valid, .l1_inj_ready, .l1_inj_to_l2, .l1_inj_dest, .l1_inj_last, .l1_inj_data,
    .l2_inj_valid, .l2_inj_ready, .l2_inj_dest, .l2_inj_last, .l2_inj_data,
    .l1_ej_valid, .l1_ej_last, .l1_ej_from_l2, .l1_ej_src, .l1_ej_data,
    .l2_ej_valid, .l2_ej_last, .l2_ej_src, .l2_ej_data,
    .cfg_we(1'b0), .cfg_sel(2'd0), .cfg_col('0), .cfg_inh('0)
  );

  initial begin : watchdog
    repeat (400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [W-1:0] word(int tag, int beat);
    return {W'(tag) << (W - 16)} | W'(beat) | (W'(32'hC0FFEE00) << 32);
  endfunction

  task automatic idle_inputs();
    l1_inj_valid = '0; l1_inj_to_l2 = '0; l1_inj_dest = '0; l1_inj_last = '0; l1_inj_data = '0;
    l2_inj_valid = '0; l2_inj_dest = '0; l2_inj_last = '0; l2_inj_data = '0;
  endtask

  initial begin
    int t0, got_l2, got_l1;
    idle_inputs();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. read request L1 7 -> L2 bank 20
    l1_inj_valid[7] = 1'b1; l1_inj_to_l2[7] = 1'b1; l1_inj_dest[7] = NL1'(1) << 20;
    l1_inj_last[7] = 1'b1; l1_inj_data[7] = word(1, 0);
    #1 check(l1_inj_ready[7], "L1 7 ready");
    t0 = cyc;
    @(negedge clk);
    idle_inputs();
    while (!l2_ej_valid[20] && cyc - t0 < 20) @(negedge clk);
    check(cyc - t0 == 4, $sformatf("request latency %0d cycles", cyc - t0));
    check(l2_ej_valid == (NL2'(1) << 20), "only bank 20 receives");
    check(l2_ej_data[20] == word(1, 0) && l2_ej_src[20] == 7 && l2_ej_last[20], "request flit");

    // 2. bank 20 -> L1 7 response and L1 40 -> L1 7 forward, four flits each
    got_l2 = 0; got_l1 = 0;
    for (int b = 0; b < 4; b++) begin
      l2_inj_valid[20] = 1'b1; l2_inj_dest[20] = NL1'(1) << 7;
      l2_inj_last[20] = (b == 3); l2_inj_data[20] = word(2, b);
      l1_inj_valid[40] = 1'b1; l1_inj_to_l2[40] = 1'b0; l1_inj_dest[40] = NL1'(1) << 7;
      l1_inj_last[40] = (b == 3); l1_inj_data[40] = word(3, b);
      #1 check(l2_inj_ready[20] && l1_inj_ready[40], "senders ready");
      @(negedge clk);
      if (l1_ej_valid[7]) begin
        if (l1_ej_from_l2[7]) got_l2++; else got_l1++;
      end
    end
    idle_inputs();
    begin
      int first_src, n, run;
      first_src = -1; n = 0; run = 0;
      for (int c = 0; c < 30; c++) begin
        if (l1_ej_valid[7]) begin
          int s;
          s = l1_ej_from_l2[7] ? 20 : 40;
          if (first_src < 0) first_src = s;
          check(l1_ej_src[7] == S1'(s), "response source index");
          check(l1_ej_data[7] == word(s == 20 ? 2 : 3, run), $sformatf("line flit %0d from %0d", run, s));
          check(l1_ej_last[7] == (run == 3), "last flag");
          n++;
          run = (run == 3) ? 0 : run + 1;
        end
        @(negedge clk);
      end
      check(n == 8, $sformatf("eight flits at L1 7 (got %0d)", n));
    end

    // 3. invalidation multicast from bank 20 to L1s 3, 40, 63
    l2_inj_valid[20] = 1'b1;
    l2_inj_dest[20] = (NL1'(1) << 3) | (NL1'(1) << 40) | (NL1'(1) << 63);
    l2_inj_last[20] = 1'b1; l2_inj_data[20] = word(4, 0);
    t0 = cyc;
    @(negedge clk);
    idle_inputs();
    while (!l1_ej_valid[3] && cyc - t0 < 20) @(negedge clk);
    check(cyc - t0 == 4, $sformatf("invalidation latency %0d cycles", cyc - t0));
    check(l1_ej_valid == ((NL1'(1) << 3) | (NL1'(1) << 40) | (NL1'(1) << 63)), "multicast reaches exactly 3, 40, 63");
    for (int j = 0; j < NL1; j++)
      if (l1_ej_valid[j])
        check(l1_ej_data[j] == word(4, 0) && l1_ej_from_l2[j] && l1_ej_src[j] == 20, "invalidation flit");
    @(negedge clk);
    check(l1_ej_valid == '0 && l2_ej_valid == '0, "network idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
