// tb_rcdba_gate_out: self-checking testbench of rcdba_gate_out.
//
// Loads random grants and ONU addresses, starts the stage and takes the gate
// frames with random back-pressure on gate_ready. Checks every frame's fields
// (DA = ONU address, SA = OLT address 5, opcode 0x0002, the three grants) in
// ONU order, that exactly N_ONU frames come out, that done pulses once on the
// cycle after the last frame is taken, and that with gate_ready held high the
// frames come one per clock.
module tb_rcdba_gate_out;
  import rcdba_pkg::*;

  localparam int N = 5;

  logic clk = 0, rst_n = 0, start = 0;
  slot_t [N-1:0][N_PRI-1:0] grant;
  addr_t [N-1:0]            onu_addr;
  logic gate_valid, gate_ready = 0, done;
  gate_t gate_data;
  int checks = 0, failures = 0;

  rcdba_gate_out #(.N_ONU(N), .OLT_ID(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    grant = '0; onu_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      automatic int got = 0, cyc = 0;
      automatic bit saw_done = 0;
      for (int j = 0; j < N; j++) begin
        onu_addr[j] = 4'($urandom_range(0, 15));
        for (int p = 0; p < 3; p++) grant[j][p] = 8'($urandom_range(0, 15));
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (!saw_done && cyc < 200) begin
        gate_ready = (run < 5) ? 1'b1 : 1'($urandom_range(0, 1));
        @(posedge clk);
        if (gate_valid && gate_ready) begin
          check(got < N, "too many frames");
          if (got < N) begin
            check(gate_data.da == onu_addr[got], $sformatf("DA of frame %0d", got));
            check(gate_data.sa == 4'd5, "SA");
            check(gate_data.opcode == 16'h0002, "opcode");
            check(gate_data.high == grant[got][0], "high grant");
            check(gate_data.mid  == grant[got][1], "middle grant");
            check(gate_data.low  == grant[got][2], "low grant");
          end
          got++;
        end
        @(negedge clk);
        cyc++;
        if (done) begin
          saw_done = 1;
          check(got == N, $sformatf("frames before done: %0d", got));
          if (run < 5) check(cyc == N, $sformatf("cycles %0d at full rate", cyc));
        end
      end
      check(saw_done, "done seen");
      check(!gate_valid, "idle after done");
      gate_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
