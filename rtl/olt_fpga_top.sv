// olt_fpga_top: FPGA top of the OLT scheduler test system.
//
// The host processor reaches the RC-DBA MAC scheduler through the CPU
// interface logic: it writes one 48-bit report per ONU as three 16-bit words,
// writes CTRL bit 0 to start the scheduler, polls CTRL until done, and reads
// back one 48-bit gate per ONU. Signals follow the host/FPGA bus of the
// design: clock, active-low reset, chip select, write and output enables, a
// 16-bit data bus, address bits 7:0 and high address bits 25:20. The
// bidirectional data bus is split into data_in, data_out and data_oe; the
// tri-state pad is outside this module.
//
// Timing: see olt_cpu_if for the bus and rcdba_scheduler for the stages.
module olt_fpga_top
  import rcdba_pkg::*;
#(
  parameter int unsigned N_ONU       = 5,
  parameter int unsigned W_W         = 8,
  parameter int unsigned TOTAL_SLOTS = 15,
  parameter int unsigned OLT_ID      = 5,
  parameter logic [5:0]  HI_SEL      = 6'h00
) (
  input  logic        ck1m,       // scheduler and interface clock
  input  logic        hreset_b,   // active-low reset
  input  logic        f_cs_b,
  input  logic        f_we_b,
  input  logic        f_oe_b,
  input  logic [7:0]  f_addr,
  input  logic [5:0]  f_addr_hi,  // host address bits 25:20
  input  logic [15:0] f_data_in,
  output logic [15:0] f_data_out,
  output logic        f_data_oe
);

  logic    sch_start, sch_busy, sch_done;
  logic    rpt_valid, rpt_ready, gate_valid, gate_ready;
  report_t rpt_data;
  gate_t   gate_data;

  olt_cpu_if #(.N_ONU(N_ONU), .HI_SEL(HI_SEL)) u_cpu_if (
    .clk(ck1m), .rst_n(hreset_b),
    .cs_b(f_cs_b), .we_b(f_we_b), .oe_b(f_oe_b),
    .addr(f_addr), .addr_hi(f_addr_hi),
    .data_in(f_data_in), .data_out(f_data_out), .data_oe(f_data_oe),
    .sch_start, .sch_busy, .sch_done,
    .rpt_valid, .rpt_ready, .rpt_data,
    .gate_valid, .gate_ready, .gate_data
  );

  rcdba_scheduler #(.N_ONU(N_ONU), .W_W(W_W), .TOTAL_SLOTS(TOTAL_SLOTS), .OLT_ID(OLT_ID)) u_sched (
    .clk(ck1m), .rst_n(hreset_b),
    .start(sch_start), .busy(sch_busy), .done(sch_done),
    .rpt_valid, .rpt_ready, .rpt_data,
    .gate_valid, .gate_ready, .gate_data
  );

endmodule
