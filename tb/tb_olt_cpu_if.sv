// tb_olt_cpu_if: self-checking testbench of olt_cpu_if.
//
// Plays the host bus (chip select, write/output enables, 16-bit data) and the
// scheduler side at once. Checks:
//   - report words written at their offsets read back, and report 0's L word
//     sits at byte offset 0x3C;
//   - a report appears on the report stream only after its L word is written,
//     reports are presented in ONU order and leave when taken;
//   - writing CTRL bit 0 gives one sch_start pulse, none while busy;
//   - gate frames from the scheduler land in the gate registers in ONU order,
//     gate 0's L word at byte offset 0x78;
//   - CTRL reads back done, busy and all-loaded;
//   - data_oe follows cs_b/oe_b, and writes with another addr_hi are ignored.
module tb_olt_cpu_if;
  import rcdba_pkg::*;

  localparam int N = 5;

  logic clk = 0, rst_n = 0;
  logic cs_b = 1, we_b = 1, oe_b = 1;
  logic [7:0] addr = 0;
  logic [5:0] addr_hi = 0;
  logic [15:0] data_in = 0, data_out;
  logic data_oe;
  logic sch_start, sch_busy = 0, sch_done = 0;
  logic rpt_valid, rpt_ready = 0, gate_valid = 0, gate_ready;
  report_t rpt_data;
  gate_t gate_data = '0;
  int checks = 0, failures = 0, starts = 0;

  olt_cpu_if #(.N_ONU(N), .HI_SEL(6'h00)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (sch_start) starts++;

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

  task automatic bus_write(logic [7:0] a, logic [15:0] d, logic [5:0] hi = 6'h00);
    @(negedge clk);
    addr = a; addr_hi = hi; data_in = d; cs_b = 0;
    @(negedge clk) we_b = 0;
    repeat (4) @(negedge clk);
    we_b = 1;
    @(negedge clk) cs_b = 1;
    repeat (2) @(negedge clk);
  endtask

  task automatic bus_read(logic [7:0] a, output logic [15:0] d);
    @(negedge clk);
    addr = a; addr_hi = 6'h00; cs_b = 0; oe_b = 0;
    #1;
    check(data_oe, "data_oe during read");
    d = data_out;
    @(negedge clk) begin cs_b = 1; oe_b = 1; end
    #1 check(!data_oe, "data_oe released");
  endtask

  function automatic logic [7:0] r_off(int j, int w);
    return 8'(4 * (1 + 3 * (N - 1 - j) + w));
  endfunction
  function automatic logic [7:0] g_off(int j, int w);
    return 8'(4 * (1 + 3 * N + 3 * (N - 1 - j) + w));
  endfunction

  initial begin
    logic [47:0] rep [N];
    logic [47:0] gt  [N];
    logic [15:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(r_off(0, 2) == 8'h3C, "report 0 L offset");
    check(g_off(0, 2) == 8'h78, "gate 0 L offset");
    for (int j = 0; j < N; j++) begin
      rep[j] = {$urandom, 16'($urandom)};
      gt[j]  = {$urandom, 16'($urandom)};
    end
    // Write with the wrong high address: ignored.
    bus_write(r_off(0, 2), 16'hBEEF, 6'h01);
    check(!rpt_valid, "foreign write ignored");
    bus_read(r_off(0, 2), d);
    check(d == 16'h0000, "foreign write left register");
    // Load reports; report j becomes valid only with its L word.
    for (int j = 0; j < N; j++) begin
      bus_write(r_off(j, 0), rep[j][47:32]);
      bus_write(r_off(j, 1), rep[j][31:16]);
      if (j == 0) check(!rpt_valid, "not valid before L word");
      bus_write(r_off(j, 2), rep[j][15:0]);
      if (j == 0) check(rpt_valid && rpt_data == rep[0], "report 0 presented");
    end
    for (int j = 0; j < N; j++)
      for (int w = 0; w < 3; w++) begin
        bus_read(r_off(j, w), d);
        check(d == rep[j][47 - 16*w -: 16], $sformatf("report %0d word %0d readback", j, w));
      end
    bus_read(8'h00, d);
    check(d == 16'h0004, "status all loaded");
    // Start.
    bus_write(8'h00, 16'h0001);
    check(starts == 1, "one start pulse");
    sch_busy = 1;
    bus_read(8'h00, d);
    check(d[1] == 1'b1, "status busy");
    // A start while busy is ignored.
    bus_write(8'h00, 16'h0001);
    check(starts == 1, "start ignored while busy");
    // Scheduler takes the reports in order.
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      check(rpt_valid && rpt_data == rep[j], $sformatf("report %0d on stream", j));
      rpt_ready = 1;
      @(negedge clk) rpt_ready = 0;
    end
    check(!rpt_valid, "stream empty after all reports");
    // Scheduler returns gates, one per clock.
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      check(gate_ready, "gate_ready");
      gate_valid = 1; gate_data = gt[j];
    end
    @(negedge clk) gate_valid = 0;
    sch_busy = 0; sch_done = 1;
    bus_read(8'h00, d);
    check(d[1:0] == 2'b01, "status done");
    for (int j = 0; j < N; j++)
      for (int w = 0; w < 3; w++) begin
        bus_read(g_off(j, w), d);
        check(d == gt[j][47 - 16*w -: 16], $sformatf("gate %0d word %0d readback", j, w));
      end
    // Start before loading: the report appears as soon as it is loaded.
    sch_done = 0;
    bus_write(8'h00, 16'h0001);
    check(starts == 2, "second start pulse");
    check(!rpt_valid, "no report before loading");
    bus_write(r_off(0, 0), 16'h5003);
    bus_write(r_off(0, 1), 16'h0703);
    bus_write(r_off(0, 2), 16'h0200);
    check(rpt_valid && rpt_data == 48'h5003_0703_0200, "late-loaded report presented");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
