// tb_rcdba_report_in: self-checking testbench of rcdba_report_in.
//
// Sends N_ONU report frames per run with random source addresses, request
// values, bitmaps and idle gaps on rpt_valid, and checks: the stored lengths
// (zero where the bitmap bit is clear), the stored source addresses, that
// rpt_ready is low outside a run, that done pulses exactly once, on the cycle
// after the last frame is taken, and that frames offered n_before start are not
// taken.
module tb_rcdba_report_in;
  import rcdba_pkg::*;

  localparam int N = 5;

  logic clk = 0, rst_n = 0, start = 0;
  logic rpt_valid = 0, rpt_ready, done;
  report_t rpt_data;
  slot_t [N-1:0][N_PRI-1:0] len;
  addr_t [N-1:0]            onu_addr;
  int checks = 0, failures = 0;
  int done_count = 0;

  rcdba_report_in #(.N_ONU(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (done) done_count++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    report_t fr [N];
    rpt_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Not started: a valid frame must not be taken.
    rpt_valid = 1;
    repeat (3) begin @(negedge clk); check(!rpt_ready, "ready while idle"); end
    rpt_valid = 0;
    for (int run = 0; run < 20; run++) begin
      automatic int n_before = done_count;
      for (int j = 0; j < N; j++) begin
        fr[j].da     = 4'd5;
        fr[j].sa     = 4'($urandom_range(0, 15));
        fr[j].q_num  = 8'd3;
        fr[j].bitmap = (run == 0) ? 8'h07 : 8'($urandom_range(0, 7));
        fr[j].high   = 8'($urandom);
        fr[j].mid    = 8'($urandom);
        fr[j].low    = 8'($urandom);
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int j = 0; j < N; j++) begin
        repeat ($urandom_range(0, 2)) @(negedge clk);
        rpt_valid = 1; rpt_data = fr[j];
        @(posedge clk);
        check(rpt_ready, "ready during run");
        @(negedge clk);
        rpt_valid = 0;
        check(done == (j == N - 1), $sformatf("done after frame %0d", j));
      end
      @(negedge clk);
      check(done_count == n_before + 1, "one done pulse per run");
      check(!rpt_ready, "ready after run");
      for (int j = 0; j < N; j++) begin
        check(onu_addr[j] == fr[j].sa, "source address");
        check(len[j][0] == (fr[j].bitmap[0] ? fr[j].high : 8'd0), "high length");
        check(len[j][1] == (fr[j].bitmap[1] ? fr[j].mid  : 8'd0), "middle length");
        check(len[j][2] == (fr[j].bitmap[2] ? fr[j].low  : 8'd0), "low length");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
