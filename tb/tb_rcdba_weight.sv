// tb_rcdba_weight: self-checking testbench of rcdba_weight.
//
// 1. Loads the reference request table (5 ONUs x 3 priorities) and checks the
//    weights against the reference weight table, entry by entry.
// 2. Runs the same requests again and checks that weights accumulate.
// 3. Clears a few queues through wclr and checks that only those reset.
// 4. Runs random request tables, comparing with the behavioural model in
//    rcdba_ref_pkg, then repeats the reference table until weights saturate
//    at 255.
// Also checks the run length in cycles against the figure the module header
// gives: per priority N_ONU request cycles plus (N_ONU + 2) per requester + 1.
module tb_rcdba_weight;
  import rcdba_pkg::*;
  import rcdba_ref_pkg::*;

  localparam int N = 5;

  logic clk = 0, rst_n = 0, start = 0;
  slot_t [N-1:0][N_PRI-1:0]        len;
  logic  [N-1:0][N_PRI-1:0]        wclr;
  logic  [N-1:0][N_PRI-1:0][7:0]   weight;
  logic busy, done;
  int checks = 0, failures = 0;

  rcdba_weight #(.N_ONU(N), .W_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference tables: requests and resulting weights.
  int t1 [N][3] = '{'{3, 2, 0}, '{4, 2, 0}, '{0, 2, 5}, '{0, 0, 6}, '{2, 0, 0}};
  int t2 [N][3] = '{'{7, 6, 0}, '{8, 7, 0}, '{0, 8, 6}, '{0, 0, 7}, '{6, 0, 0}};

  mat_t mlen, mw;

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

  task automatic compare(string tag);
    for (int j = 0; j < N; j++)
      for (int p = 0; p < 3; p++)
        check(int'(weight[j][p]) == mw[j][p],
              $sformatf("%s weight[%0d][%0d]=%0d expected %0d", tag, j, p, weight[j][p], mw[j][p]));
  endtask

  function automatic int expected_cycles(mat_t l);
    int c = 0;
    for (int p = 0; p < 3; p++) begin
      int k = 0;
      for (int j = 0; j < N; j++) if (l[j][p] != 0) k++;
      c += N + 1 + k * (N + 2);
    end
    return c;
  endfunction

  initial begin
    int cyc;
    wclr = '0;
    len  = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (mw[j, p]) begin mw[j][p] = 0; mlen[j][p] = 0; end
    for (int j = 0; j < N; j++) for (int p = 0; p < 3; p++) begin
      len[j][p] = slot_t'(t1[j][p]);
      mlen[j][p] = t1[j][p];
      mw[j][p] = t2[j][p];
    end
    run(cyc);
    compare("table");
    check(cyc == expected_cycles(mlen), $sformatf("cycles %0d expected %0d", cyc, expected_cycles(mlen)));

    // Accumulation: same requests again.
    ref_weight(N, mlen, mw, 255);
    run(cyc);
    compare("second run");

    // Clear three queues.
    @(negedge clk);
    wclr = '0; wclr[0][0] = 1; wclr[2][1] = 1; wclr[3][2] = 1;
    @(negedge clk) wclr = '0;
    mw[0][0] = 0; mw[2][1] = 0; mw[3][2] = 0;
    compare("clear");

    // Random tables, small request values so that ties are common.
    for (int it = 0; it < 40; it++) begin
      for (int j = 0; j < N; j++) for (int p = 0; p < 3; p++) begin
        mlen[j][p] = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 4);
        len[j][p]  = slot_t'(mlen[j][p]);
      end
      ref_weight(N, mlen, mw, 255);
      run(cyc);
      compare($sformatf("random %0d", it));
      check(cyc == expected_cycles(mlen), "random cycle count");
    end
    // Saturation: the reference table repeated until weights pass 255.
    for (int j = 0; j < N; j++) for (int p = 0; p < 3; p++) begin
      len[j][p] = slot_t'(t1[j][p]);
      mlen[j][p] = t1[j][p];
    end
    for (int it = 0; it < 40; it++) begin
      ref_weight(N, mlen, mw, 255);
      run(cyc);
      compare($sformatf("saturation %0d", it));
    end
    check(weight[1][0] == 8'hFF, "weight saturated at 255");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
