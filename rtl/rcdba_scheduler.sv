// rcdba_scheduler: OLT MAC scheduler running the RC-DBA algorithm.
//
// A start pulse runs one scheduling cycle through four stages in sequence:
//   report input  (rcdba_report_in) - take one report frame per ONU,
//   weight update (rcdba_weight)     - RC-DBA weights per ONU and priority,
//   allocation    (rcdba_alloc)      - weight-ordered grants of TOTAL_SLOTS,
//   gate output   (rcdba_gate_out)   - one gate frame per ONU.
// Each stage's done pulse starts the next. When the last gate frame has been
// taken, done goes to 1 and stays there until the next start; busy is high
// from start until then.
//
// Weights carry over between cycles, so a queue that asked for slots and did
// not get all of them keeps its raised weight for the next cycle. A queue that
// was granted its whole (non-zero) request has its weight cleared when the
// allocation finishes. The stage order and the start/done control follow the
// design; the carry-over and clearing rule are this implementation's reading
// of the fairness rule, which does not say when a weight is reset.
//
// Timing: reports are accepted one per clock, gates emitted one per clock;
// the weight and allocation stages take a few hundred cycles at N_ONU = 5.
module rcdba_scheduler
  import rcdba_pkg::*;
#(
  parameter int unsigned N_ONU       = 5,
  parameter int unsigned W_W         = 8,
  parameter int unsigned TOTAL_SLOTS = 15,
  parameter int unsigned OLT_ID      = 5
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  output logic     busy,
  output logic     done,
  // report frames in
  input  logic     rpt_valid,
  output logic     rpt_ready,
  input  report_t  rpt_data,
  // gate frames out
  output logic     gate_valid,
  input  logic     gate_ready,
  output gate_t    gate_data
);

  typedef enum logic [2:0] {S_IDLE, S_REPORT, S_WEIGHT, S_ALLOC, S_GATE} state_t;

  state_t state;

  slot_t [N_ONU-1:0][N_PRI-1:0]          len;
  slot_t [N_ONU-1:0][N_PRI-1:0]          grant;
  addr_t [N_ONU-1:0]                     onu_addr;
  logic  [N_ONU-1:0][N_PRI-1:0][W_W-1:0] weight;
  logic  [N_ONU-1:0][N_PRI-1:0]          full;
  logic  [N_ONU-1:0][N_PRI-1:0]          wclr;
  logic rin_done, w_done, a_done, g_done, w_busy, a_busy;
  logic go;

  assign go = start && (state == S_IDLE);

  always_comb begin
    for (int o = 0; o < N_ONU; o++)
      for (int q = 0; q < N_PRI; q++)
        full[o][q] = (len[o][q] != '0) && (grant[o][q] == len[o][q]);
  end

  // Clear the weights of fully granted queues as allocation finishes.
  assign wclr = a_done ? full : '0;

  rcdba_report_in #(.N_ONU(N_ONU)) u_report_in (
    .clk, .rst_n, .start(go),
    .rpt_valid, .rpt_ready, .rpt_data,
    .done(rin_done), .len, .onu_addr
  );

  rcdba_weight #(.N_ONU(N_ONU), .W_W(W_W)) u_weight (
    .clk, .rst_n, .start(rin_done), .len, .wclr,
    .weight, .busy(w_busy), .done(w_done)
  );

  rcdba_alloc #(.N_ONU(N_ONU), .W_W(W_W), .TOTAL_SLOTS(TOTAL_SLOTS)) u_alloc (
    .clk, .rst_n, .start(w_done), .len, .weight,
    .grant, .busy(a_busy), .done(a_done)
  );

  rcdba_gate_out #(.N_ONU(N_ONU), .OLT_ID(OLT_ID)) u_gate_out (
    .clk, .rst_n, .start(a_done), .grant, .onu_addr,
    .gate_valid, .gate_ready, .gate_data, .done(g_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:   if (start) begin state <= S_REPORT; done <= 1'b0; end
        S_REPORT: if (rin_done) state <= S_WEIGHT;
        S_WEIGHT: if (w_done)   state <= S_ALLOC;
        S_ALLOC:  if (a_done)   state <= S_GATE;
        S_GATE:   if (g_done) begin state <= S_IDLE; done <= 1'b1; end
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The weight unit must be idle while allocation reads the weights.
  a_stage_excl: assert property (@(posedge clk) disable iff (!rst_n) !(w_busy && a_busy));

endmodule
