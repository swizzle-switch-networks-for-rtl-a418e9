// Self-checking testbench of l1_mux (4 L1 columns, 8-bit data).
//
// Random column status of the two switches (never both holding a column,
// never both read buffers valid, as the interlock guarantees in the network)
// is driven every cycle. An independent model of the interlock checks a_en
// and b_en: a busy column in one switch blocks the other; a same-cycle tie
// goes to the switch not granted last time. The merged port must carry the
// valid read buffer with its source and switch flag. Ties in both directions
// and blocking by a busy column must occur.
module tb_l1_mux;

  localparam int N = 4;
  localparam int W = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0]         a_req, a_busy, b_req, b_busy, a_en, b_en;
  logic [N-1:0]         a_valid, a_last, b_valid, b_last;
  logic [N-1:0][1:0]    a_src, b_src, y_src;
  logic [N-1:0][W-1:0]  a_data, b_data, y_data;
  logic [N-1:0]         y_valid, y_last, y_from_b;

  l1_mux #(.N_L1(N), .W(W), .SWA(2), .SWB(2)) dut (
    .clk, .rst_n, .a_req, .a_busy, .b_req, .b_busy, .a_en, .b_en,
    .a_valid, .a_last, .a_src, .a_data, .b_valid, .b_last, .b_src, .b_data,
    .y_valid, .y_last, .y_from_b, .y_src, .y_data
  );

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  bit pref_b [N];
  int n_tie_a = 0, n_tie_b = 0, n_block = 0;

  initial begin
    for (int j = 0; j < N; j++) pref_b[j] = 1'b1;
    {a_req, a_busy, b_req, b_busy, a_valid, a_last, b_valid, b_last} = '0;
    a_src = '0; b_src = '0; a_data = '0; b_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        int s;
        s = $urandom_range(0, 2);     // 0 free, 1 a holds, 2 b holds
        a_busy[j] = (s == 1);
        b_busy[j] = (s == 2);
        a_req[j]  = 1'($urandom);
        b_req[j]  = 1'($urandom);
        s = $urandom_range(0, 2);
        a_valid[j] = (s == 1);
        b_valid[j] = (s == 2);
      end
      a_last = N'($urandom); b_last = N'($urandom);
      a_src = 8'($urandom); b_src = 8'($urandom);
      a_data = 32'($urandom); b_data = 32'($urandom);
      #1;
      for (int j = 0; j < N; j++) begin
        bit ea, eb;
        ea = !b_busy[j] && !(b_req[j] && pref_b[j]);
        eb = !a_busy[j] && !(a_req[j] && !pref_b[j]);
        check(a_en[j] == ea && b_en[j] == eb, $sformatf("enables col %0d cyc %0d", j, cyc));
        if (!a_busy[j] && !b_busy[j] && a_req[j] && b_req[j]) begin
          if (pref_b[j]) n_tie_b++; else n_tie_a++;
        end
        if ((a_busy[j] && b_req[j]) || (b_busy[j] && a_req[j])) n_block++;
        check(y_valid[j] == (a_valid[j] || b_valid[j]), "y_valid");
        if (b_valid[j])
          check(y_from_b[j] && y_data[j] == b_data[j] && y_src[j] == b_src[j] && y_last[j] == b_last[j], "merge b");
        else if (a_valid[j])
          check(!y_from_b[j] && y_data[j] == a_data[j] && y_src[j] == a_src[j] && y_last[j] == a_last[j], "merge a");
        if (a_req[j] && ea && !a_busy[j]) pref_b[j] = 1'b1;
        else if (b_req[j] && eb && !b_busy[j]) pref_b[j] = 1'b0;
      end
    end
    $display("tie_a=%0d tie_b=%0d blocked=%0d", n_tie_a, n_tie_b, n_block);
    check(n_tie_a > 0 && n_tie_b > 0 && n_block > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
