// tb_olt_fpga_top: end-to-end testbench of the OLT scheduler FPGA, with every
// parameter at its default (5 ONUs, 15 time slots per cycle).
//
// The testbench plays the host: like the device driver it writes each 48-bit
// report as three 16-bit words, writes CTRL bit 0 to start the scheduler,
// polls CTRL until done and reads back the three words of each gate.
// Cycle 0 is the reference run (reports 0x5003_0703_0200, 0x5103_0704_0200,
// 0x5203_0700_0205, 0x5303_0700_0006, 0x5403_0702_0000) and must give the
// reference grants (High 3,4,0,0,2; Middle 0,1,2,0,0; Low 0,0,0,3,0).
// A directed cycle in which Middle leaves budget unused follows, then 40
// random cycles, checked against rcdba_ref_pkg with weights
// carried across cycles. Odd cycles start the scheduler before loading the
// reports, even ones after.
// Counted mechanisms, each of which must occur at least once: a ranking tie
// between equal requests, a partial grant, the Middle half-budget limiting
// Middle, Low receiving Middle's leftovers, a weight carried into a cycle, a
// weight cleared after a full grant, and both start/load orders.
module tb_olt_fpga_top;
  import rcdba_pkg::*;
  import rcdba_ref_pkg::*;

  localparam int N = 5;
  localparam int TOTAL = 15;

  logic ck1m = 0, hreset_b = 0;
  logic f_cs_b = 1, f_we_b = 1, f_oe_b = 1;
  logic [7:0] f_addr = 0;
  logic [5:0] f_addr_hi = 0;
  logic [15:0] f_data_in = 0, f_data_out;
  logic f_data_oe;
  int checks = 0, failures = 0;

  olt_fpga_top dut (.*);

  always #5 ck1m = ~ck1m;

  initial begin
    repeat (2000000) @(posedge ck1m);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t3 [N][3] = '{'{3, 0, 0}, '{4, 1, 0}, '{0, 2, 0}, '{0, 0, 3}, '{2, 0, 0}};
  logic [47:0] ref_rep [N] = '{48'h5003_0703_0200, 48'h5103_0704_0200, 48'h5203_0700_0205,
                               48'h5303_0700_0006, 48'h5403_0702_0000};

  // mechanism counters
  int n_tie = 0, n_partial = 0, n_mid_half = 0, n_low_leftover = 0;
  int n_carry = 0, n_clear = 0, n_start_first = 0, n_load_first = 0;

  mat_t mlen, mw, mg;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(logic [7:0] a, logic [15:0] d);
    @(negedge ck1m);
    f_addr = a; f_data_in = d; f_cs_b = 0;
    @(negedge ck1m) f_we_b = 0;
    repeat (4) @(negedge ck1m);
    f_we_b = 1;
    @(negedge ck1m) f_cs_b = 1;
    repeat (2) @(negedge ck1m);
  endtask

  task automatic bus_read(logic [7:0] a, output logic [15:0] d);
    @(negedge ck1m);
    f_addr = a; f_cs_b = 0; f_oe_b = 0;
    @(negedge ck1m);
    check(f_data_oe, "data bus driven during read");
    d = f_data_out;
    f_cs_b = 1; f_oe_b = 1;
  endtask

  function automatic logic [7:0] r_off(int j, int w);
    return 8'(4 * (1 + 3 * (N - 1 - j) + w));
  endfunction
  function automatic logic [7:0] g_off(int j, int w);
    return 8'(4 * (1 + 3 * N + 3 * (N - 1 - j) + w));
  endfunction

  task automatic load_reports(logic [47:0] rep [N]);
    for (int j = 0; j < N; j++)
      for (int w = 0; w < 3; w++) bus_write(r_off(j, w), rep[j][47 - 16*w -: 16]);
  endtask

  // Reference prediction plus mechanism bookkeeping.
  task automatic predict();
    int held, t;
    for (int j = 0; j < N; j++) for (int p = 0; p < 3; p++) if (mw[j][p] != 0) begin n_carry++; break; end
    for (int p = 0; p < 3; p++)
      for (int a = 0; a < N; a++) for (int b = a + 1; b < N; b++)
        if (mlen[a][p] != 0 && mlen[a][p] == mlen[b][p]) n_tie++;
    ref_weight(N, mlen, mw, 255);
    ref_alloc(N, mlen, mw, TOTAL, mg);
    // budgets as the allocation rule sets them
    t = TOTAL;
    for (int j = 0; j < N; j++) t -= mg[j][0];
    begin
      int mid_req = 0, mid_got = 0, low_got = 0;
      for (int j = 0; j < N; j++) begin mid_req += mlen[j][1]; mid_got += mg[j][1]; low_got += mg[j][2]; end
      if (mid_req > t / 2 && t / 2 < t) n_mid_half++;
      if (low_got > t - t / 2) n_low_leftover++;
    end
    for (int j = 0; j < N; j++) for (int p = 0; p < 3; p++) begin
      if (mg[j][p] != 0 && mg[j][p] < mlen[j][p]) n_partial++;
      if (mlen[j][p] != 0 && mg[j][p] == mlen[j][p]) begin
        if (mw[j][p] != 0) n_clear++;
        mw[j][p] = 0;
      end
    end
  endtask

  task automatic run_cycle(logic [47:0] rep [N], bit start_first);
    logic [15:0] d;
    int polls = 0;
    if (start_first) begin
      bus_write(8'h00, 16'h0001);
      load_reports(rep);
      n_start_first++;
    end else begin
      load_reports(rep);
      bus_read(8'h00, d);
      check(d[2], "all reports loaded");
      bus_write(8'h00, 16'h0001);
      n_load_first++;
    end
    do begin bus_read(8'h00, d); polls++; end while (!d[0] && polls < 1000);
    check(d[0] && !d[1], "scheduler done");
    for (int j = 0; j < N; j++) begin
      logic [47:0] g;
      for (int w = 0; w < 3; w++) begin
        bus_read(g_off(j, w), d);
        g[47 - 16*w -: 16] = d;
      end
      check(g[47:44] == 4'(j) && g[43:40] == 4'd5 && g[39:24] == 16'h0002,
            $sformatf("gate %0d header %h", j, g[47:24]));
      for (int p = 0; p < 3; p++)
        check(int'(g[23 - 8*p -: 8]) == mg[j][p],
              $sformatf("gate %0d priority %0d grant %0d expected %0d", j, p, g[23 - 8*p -: 8], mg[j][p]));
    end
  endtask

  initial begin
    logic [47:0] rep [N];
    foreach (mw[j, p]) begin mw[j][p] = 0; mlen[j][p] = 0; mg[j][p] = 0; end
    repeat (3) @(negedge ck1m);
    hreset_b = 1;
    // Reference cycle.
    for (int j = 0; j < N; j++) begin
      mlen[j][0] = int'(ref_rep[j][23:16]);
      mlen[j][1] = int'(ref_rep[j][15:8]);
      mlen[j][2] = int'(ref_rep[j][7:0]);
    end
    predict();
    for (int j = 0; j < N; j++) for (int p = 0; p < 3; p++)
      check(mg[j][p] == t3[j][p], "prediction matches the reference grant table");
    run_cycle(ref_rep, 0);
    // Directed cycle: Middle leaves most of its half unused, Low takes it.
    for (int j = 0; j < N; j++) begin
      mlen[j][0] = 1;
      mlen[j][1] = (j == 0) ? 1 : 0;
      mlen[j][2] = (j == 3) ? 9 : 0;
      rep[j] = {4'd5, 4'(j), 8'd3, 8'h07, 8'(mlen[j][0]), 8'(mlen[j][1]), 8'(mlen[j][2])};
    end
    predict();
    check(mg[3][2] == 9, "prediction: Low takes Middle's leftovers");
    run_cycle(rep, 0);
    // Random cycles.
    for (int it = 1; it <= 40; it++) begin
      for (int j = 0; j < N; j++) begin
        for (int p = 0; p < 3; p++)
          mlen[j][p] = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 6);
        rep[j] = {4'd5, 4'(j), 8'd3, 8'h07, 8'(mlen[j][0]), 8'(mlen[j][1]), 8'(mlen[j][2])};
      end
      predict();
      run_cycle(rep, it % 2 == 1);
    end
    $display("mechanisms: tie=%0d partial=%0d mid_half=%0d low_leftover=%0d carry=%0d clear=%0d start_first=%0d load_first=%0d",
             n_tie, n_partial, n_mid_half, n_low_leftover, n_carry, n_clear, n_start_first, n_load_first);
    check(n_tie > 0, "ranking tie exercised");
    check(n_partial > 0, "partial grant exercised");
    check(n_mid_half > 0, "middle half budget exercised");
    check(n_low_leftover > 0, "low leftover exercised");
    check(n_carry > 0, "weight carry-over exercised");
    check(n_clear > 0, "weight clear exercised");
    check(n_start_first > 0 && n_load_first > 0, "both start orders exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
