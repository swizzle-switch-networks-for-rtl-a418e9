// Self-checking testbench of ss_arb_column (one Swizzle-Switch output column).
//
// 1. Loads the five-input example priority matrix (priorities 1,0,2,4,3 for
//    inputs 0..4) and checks the two published arbitration outcomes: inputs
//    0 and 1 -> 0 wins; inputs 0 and 2 -> 2 wins.
// 2. Requests from inputs 0, 2 and 4: input 4 wins, and the matrix after the
//    LRG update must equal the published result (priorities 2,1,3,4,0).
// 3. Mode rules: no re-arbitration while granted, release only by the owner,
//    en = 0 blocks arbitration, grant one cycle after the request.
// 4. Random traffic on N = 8 against an independent model: a rank list in
//    which the winner moves to the back (least recently granted).
module tb_ss_arb_column;

  localparam int N = 5;
  localparam int R = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------- N = 5 column
  logic [N-1:0]         req, rel, gnt, win;
  logic                 en, cfg_we, busy;
  logic [N-1:0][N-1:0]  cfg_prio, prio;       // row-major: [i][j] = M(i,j)
  logic [N-1:0][N-1:0]  cfg_inh, inh;         // the DUT's view: [j][i]

  ss_arb_column #(.N(N)) dut (
    .clk, .rst_n, .req, .en, .rel, .cfg_we, .cfg_inh,
    .gnt, .busy, .win, .inh
  );

  always_comb
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        prio[i][j]    = inh[j][i];
        cfg_inh[j][i] = cfg_prio[i][j];
      end

  // ---------------------------------------------------------- N = 8 column
  logic [R-1:0]         r_req, r_rel, r_gnt, r_win;
  logic                 r_busy;
  logic [R-1:0][R-1:0]  r_prio, r_inh;

  ss_arb_column #(.N(R)) dut_r (
    .clk, .rst_n, .req(r_req), .en(1'b1), .rel(r_rel), .cfg_we(1'b0),
    .cfg_inh('0), .gnt(r_gnt), .busy(r_busy), .win(r_win), .inh(r_inh)
  );

  always_comb
    for (int i = 0; i < R; i++)
      for (int j = 0; j < R; j++)
        r_prio[i][j] = r_inh[j][i];

  // Rows of a matrix given as strings "X1000": index 0 is X_0.
  function automatic logic [N-1:0][N-1:0] mat(input string rows [N]);
    logic [N-1:0][N-1:0] m;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        m[i][j] = (rows[i][j] == "1");
    return m;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rank [R];   // model: rank[0] is the highest priority input
  int owner;
  int mbad;

  initial begin
    logic [N-1:0][N-1:0] fig_a, fig_b;
    string ra [N] = '{"X1000", "0X000", "11X00", "111X1", "1110X"};
    string rb [N] = '{"X1001", "0X001", "11X01", "111X1", "0000X"};
    fig_a = mat(ra);
    fig_b = mat(rb);

    req = '0; rel = '0; en = 1'b1; cfg_we = 1'b0; cfg_prio = '0;
    r_req = '0; r_rel = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // reset order: input 0 highest
    check(prio[0][N-1] && !prio[N-1][0], "reset order");

    cfg_we = 1'b1; cfg_prio = fig_a;
    @(negedge clk);
    cfg_we = 1'b0;
    check(prio == fig_a, "matrix loaded");

    // In0 vs In1 -> In0; In0 vs In2 -> In2 (combinational result only, en=0 keeps state)
    req = 5'b00011; #1;
    check(win == 5'b00001, "In0 beats In1");
    req = 5'b00101; #1;
    check(win == 5'b00100, "In2 beats In0");
    en = 1'b0; #1;
    check(win == '0, "en=0 blocks arbitration");
    @(negedge clk);
    check(gnt == '0 && prio == fig_a, "blocked column unchanged");

    // In0, In2, In4 -> In4, LRG update
    en = 1'b1; req = 5'b10101; #1;
    check(win == 5'b10000, "In4 wins among 0,2,4");
    @(negedge clk);
    check(gnt == 5'b10000, "grant one cycle after request");
    check(prio == fig_b, "LRG update matches published matrix");
    check(busy, "busy after grant");

    // while granted: other requests and foreign releases ignored
    req = 5'b01111; rel = 5'b01111; #1;
    check(win == '0, "no arbitration while granted");
    @(negedge clk);
    check(gnt == 5'b10000 && prio == fig_b, "held against others");
    req = '0; rel = 5'b10000;
    @(negedge clk);
    rel = '0;
    check(gnt == '0 && !busy, "released by owner");
    req = 5'b01000; #1;
    check(win == 5'b01000, "free column arbitrates next cycle");
    @(negedge clk);
    req = '0; rel = 5'b01000;
    @(negedge clk);
    rel = '0;

    // ---------------------------------------------- random, N = 8
    for (int i = 0; i < R; i++) rank[i] = i;
    owner = -1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic [R-1:0] rq;
      int exp_w;
      rq = R'($urandom);
      r_req = rq;
      r_rel = '0;
      exp_w = -1;
      if (owner >= 0) begin
        if ($urandom_range(0, 2) == 0) r_rel = R'(1) << owner;
        if ($urandom_range(0, 3) == 0) r_rel |= R'($urandom);
      end else begin
        for (int k = 0; k < R; k++)
          if (exp_w < 0 && rq[rank[k]]) exp_w = rank[k];
      end
      #1;
      if (owner < 0)
        check(r_win == ((exp_w >= 0) ? (R'(1) << exp_w) : '0), $sformatf("random win cyc %0d", cyc));
      @(negedge clk);
      if (owner >= 0) begin
        if (r_rel[owner]) owner = -1;
      end else if (exp_w >= 0) begin
        int pos;
        owner = exp_w;
        pos = 0;
        for (int k = 0; k < R; k++) if (rank[k] == exp_w) pos = k;
        for (int k = pos; k < R - 1; k++) rank[k] = rank[k + 1];
        rank[R - 1] = exp_w;
      end
      check(r_gnt == ((owner >= 0) ? (R'(1) << owner) : '0), $sformatf("random gnt cyc %0d", cyc));
      mbad = 0;
      for (int a = 0; a < R; a++)
        for (int b = 0; b < R; b++)
          if (a != b) begin
            int pa, pb;
            pa = 0; pb = 0;
            for (int k = 0; k < R; k++) begin
              if (rank[k] == a) pa = k;
              if (rank[k] == b) pb = k;
            end
            if (r_prio[a][b] != (pa < pb)) mbad++;
          end
      check(mbad == 0, $sformatf("random matrix cyc %0d", cyc));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
