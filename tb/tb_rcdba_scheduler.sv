// tb_rcdba_scheduler: self-checking testbench of rcdba_scheduler.
//
// Feeds one scheduling cycle of report frames and collects the gate frames.
// The first cycle uses the reference request table and must give the
// reference grant table. Then 30 cycles of random requests follow; the
// expected grants come from rcdba_ref_pkg with the weights carried from cycle
// to cycle and cleared for every queue that was granted its whole request.
// Reports are offered with random gaps and gates taken with random
// back-pressure. Also checks busy/done (done stays high until the next start)
// and that the weight and allocation stages add up to the expected cycle
// count when reports and gates flow without gaps.
module tb_rcdba_scheduler;
  import rcdba_pkg::*;
  import rcdba_ref_pkg::*;

  localparam int N = 5;
  localparam int TOTAL = 15;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic rpt_valid = 0, rpt_ready, gate_valid, gate_ready = 0;
  report_t rpt_data;
  gate_t gate_data;
  int checks = 0, failures = 0;

  rcdba_scheduler #(.N_ONU(N), .W_W(8), .TOTAL_SLOTS(TOTAL), .OLT_ID(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t1 [N][3] = '{'{3, 2, 0}, '{4, 2, 0}, '{0, 2, 5}, '{0, 0, 6}, '{2, 0, 0}};
  int t3 [N][3] = '{'{3, 0, 0}, '{4, 1, 0}, '{0, 2, 0}, '{0, 0, 3}, '{2, 0, 0}};

  mat_t mlen, mw, mg;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One scheduling cycle; returns the number of clocks from start to done.
  task automatic cycle(bit gaps, output int clocks);
    automatic int got = 0;
    automatic int c = 0;
    fork
      begin
        for (int j = 0; j < N; j++) begin
          if (gaps) repeat ($urandom_range(0, 3)) @(negedge clk);
          rpt_data = '{da: 4'd5, sa: 4'(j), q_num: 8'd3, bitmap: 8'h07,
                       high: 8'(mlen[j][0]), mid: 8'(mlen[j][1]), low: 8'(mlen[j][2])};
          rpt_valid = 1;
          do @(posedge clk); while (!rpt_ready);
          @(negedge clk) rpt_valid = 0;
        end
      end
      begin
        @(negedge clk) start = 1;
        @(negedge clk) start = 0;
        c = 1;
        check(busy && !done, "busy after start");
        while (!done) begin
          gate_ready = gaps ? 1'($urandom_range(0, 1)) : 1'b1;
          @(posedge clk);
          if (gate_valid && gate_ready) begin
            check(got < N, "too many gates");
            if (got < N) begin
              check(gate_data.da == 4'(got) && gate_data.sa == 4'd5 && gate_data.opcode == 16'h0002,
                    $sformatf("gate %0d header", got));
              check(int'(gate_data.high) == mg[got][0], $sformatf("gate %0d high %0d exp %0d", got, gate_data.high, mg[got][0]));
              check(int'(gate_data.mid)  == mg[got][1], $sformatf("gate %0d mid %0d exp %0d", got, gate_data.mid, mg[got][1]));
              check(int'(gate_data.low)  == mg[got][2], $sformatf("gate %0d low %0d exp %0d", got, gate_data.low, mg[got][2]));
            end
            got++;
          end
          @(negedge clk);
          c++;
        end
        gate_ready = 0;
      end
    join
    check(got == N, $sformatf("gates received %0d", got));
    repeat (3) @(negedge clk);
    check(done && !busy, "done held after cycle");
    clocks = c;
  endtask

  task automatic predict();
    ref_weight(N, mlen, mw, 255);
    ref_alloc(N, mlen, mw, TOTAL, mg);
    for (int j = 0; j < N; j++) for (int p = 0; p < 3; p++)
      if (mlen[j][p] != 0 && mg[j][p] == mlen[j][p]) mw[j][p] = 0;
  endtask

  initial begin
    int clocks;
    rpt_data = '0;
    foreach (mw[j, p]) begin mw[j][p] = 0; mlen[j][p] = 0; mg[j][p] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    for (int j = 0; j < N; j++) for (int p = 0; p < 3; p++) mlen[j][p] = t1[j][p];
    predict();
    for (int j = 0; j < N; j++) for (int p = 0; p < 3; p++)
      check(mg[j][p] == t3[j][p], "reference model agrees with the grant table");
    cycle(0, clocks);
    $display("reference cycle: %0d clocks from start to done", clocks);
    for (int it = 0; it < 30; it++) begin
      for (int j = 0; j < N; j++) for (int p = 0; p < 3; p++)
        mlen[j][p] = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 7);
      predict();
      cycle(it % 2 == 1, clocks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
