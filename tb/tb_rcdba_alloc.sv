// tb_rcdba_alloc: self-checking testbench of rcdba_alloc.
//
// 1. Applies the reference requests and weights (5 ONUs, 15 slots) and checks
//    the grants against the reference allocation table.
// 2. Applies random requests and weights and compares with the behavioural
//    model in rcdba_ref_pkg; it also checks that no more than 15 slots are
//    granted, that no grant exceeds its request, and that a priority never
//    overtakes a higher one.
// 3. Checks the run length: one cycle to set each budget, one per
//    loop test, and N_ONU + 1 per grant.
module tb_rcdba_alloc;
  import rcdba_pkg::*;
  import rcdba_ref_pkg::*;

  localparam int N = 5;
  localparam int TOTAL = 15;

  logic clk = 0, rst_n = 0, start = 0;
  slot_t [N-1:0][N_PRI-1:0]        len;
  logic  [N-1:0][N_PRI-1:0][7:0]   weight;
  slot_t [N-1:0][N_PRI-1:0]        grant;
  logic busy, done;
  int checks = 0, failures = 0;

  rcdba_alloc #(.N_ONU(N), .W_W(8), .TOTAL_SLOTS(TOTAL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t1 [N][3] = '{'{3, 2, 0}, '{4, 2, 0}, '{0, 2, 5}, '{0, 0, 6}, '{2, 0, 0}};
  int t2 [N][3] = '{'{7, 6, 0}, '{8, 7, 0}, '{0, 8, 6}, '{0, 0, 7}, '{6, 0, 0}};
  int t3 [N][3] = '{'{3, 0, 0}, '{4, 1, 0}, '{0, 2, 0}, '{0, 0, 3}, '{2, 0, 0}};

  mat_t mlen, mw, mg;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(output int cycles);
    int c = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin @(negedge clk); c++; end
    cycles = c;
  endtask

  // Expected cycles from the reference grants: a priority issues grants
  // until N_ONU grants are made or its budget is empty.
  function automatic int expected_cycles(mat_t l, mat_t w);
    int c = 0, t = TOTAL, held = 0;
    mat_t g;
    ref_alloc(N, l, w, TOTAL, g);
    for (int p = 0; p < 3; p++) begin
      int key[MAXN];
      bit valid[MAXN];
      int ng = 0;
      if (p == 1) begin held = t - t / 2; t = t / 2; end
      if (p == 2) t = t + held;
      for (int j = 0; j < N; j++) begin key[j] = w[j][p]; valid[j] = 1; end
      while (ng < N && t > 0) begin
        int b = pick_max(N, key, valid);
        valid[b] = 0;
        t -= g[b][p];
        ng++;
      end
      c += 1 + (ng + 1) + ng * (N + 1);
    end
    return c;
  endfunction

  task automatic compare(string tag);
    int sum = 0;
    for (int j = 0; j < N; j++)
      for (int p = 0; p < 3; p++) begin
        check(int'(grant[j][p]) == mg[j][p],
              $sformatf("%s grant[%0d][%0d]=%0d expected %0d", tag, j, p, grant[j][p], mg[j][p]));
        check(grant[j][p] <= len[j][p], $sformatf("%s grant above request", tag));
        sum += int'(grant[j][p]);
      end
    check(sum <= TOTAL, $sformatf("%s granted %0d slots", tag, sum));
  endtask

  initial begin
    int cyc;
    len = '0; weight = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (mg[j, p]) begin mg[j][p] = 0; mlen[j][p] = 0; mw[j][p] = 0; end
    for (int j = 0; j < N; j++) for (int p = 0; p < 3; p++) begin
      len[j][p] = slot_t'(t1[j][p]);    mlen[j][p] = t1[j][p];
      weight[j][p] = 8'(t2[j][p]);      mw[j][p] = t2[j][p];
      mg[j][p] = t3[j][p];
    end
    run(cyc);
    compare("table");
    check(cyc == expected_cycles(mlen, mw), $sformatf("cycles %0d expected %0d", cyc, expected_cycles(mlen, mw)));

    for (int it = 0; it < 60; it++) begin
      for (int j = 0; j < N; j++) for (int p = 0; p < 3; p++) begin
        mlen[j][p] = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 8);
        mw[j][p]   = $urandom_range(0, 12);
        len[j][p]  = slot_t'(mlen[j][p]);
        weight[j][p] = 8'(mw[j][p]);
      end
      ref_alloc(N, mlen, mw, TOTAL, mg);
      run(cyc);
      compare($sformatf("random %0d", it));
      check(cyc == expected_cycles(mlen, mw), $sformatf("random cycles %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
