// rcdba_alloc: RC-DBA bandwidth (time-slot) allocation.
//
// One start pulse allocates TOTAL_SLOTS time slots of one scheduling cycle
// over all ONUs and priorities, using the weights from rcdba_weight.
// Priorities are served in order High, Middle, Low. For each of them the
// ONUs are visited in decreasing weight order: a scan over all ONUs (one per
// clock) picks the not-yet-served ONU with the largest weight (">=", so the
// highest-numbered ONU wins a tie), which is granted min(request, budget),
// and the budget shrinks by the grant. A priority ends after N_ONU grants or
// when its budget is exhausted.
//   High   : budget = all TOTAL_SLOTS, so every High request is granted in
//            full when it fits.
//   Middle : budget = half (rounded down) of what High left; the other half
//            is held back in mp_bw.
//   Low    : budget = the held-back half plus whatever Middle left unused.
// The outer priority loop, the halving into a held-back register and the
// weight-ordered grant loop follow the allocation ASM chart of the design.
// Giving Low the Middle leftovers, and rounding the halving down, are this
// implementation's reading; both agree with the reference results.
//
// Timing: each grant costs N_ONU + 2 cycles; done pulses for one cycle after
// the Low priority; grant is stable from done until the next start.
module rcdba_alloc
  import rcdba_pkg::*;
#(
  parameter int unsigned N_ONU       = 5,
  parameter int unsigned W_W         = 8,
  parameter int unsigned TOTAL_SLOTS = 15
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  start,
  input  slot_t [N_ONU-1:0][N_PRI-1:0]          len,
  input  logic  [N_ONU-1:0][N_PRI-1:0][W_W-1:0] weight,
  output slot_t [N_ONU-1:0][N_PRI-1:0]          grant,
  output logic                                  busy,
  output logic                                  done
);

  localparam int unsigned JW = $clog2(N_ONU + 1);
  localparam int unsigned PW = 2;

  typedef enum logic [2:0] {S_IDLE, S_PRI, S_T11, S_SCAN, S_GRANT} state_t;

  state_t             state;
  logic [PW-1:0]      i;
  logic [JW-1:0]      j;
  logic [JW-1:0]      idx;
  logic [JW-1:0]      tmp_num;
  logic [W_W-1:0]     max_w;
  logic [N_ONU-1:0]   sel;
  slot_t              t_bw;
  slot_t              mp_bw;
  slot_t              g;

  initial assert (TOTAL_SLOTS < 2**SLOT_W)
    else $error("TOTAL_SLOTS must fit a grant field");

  assign busy = (state != S_IDLE);
  // Grant for the selected ONU: its whole request or the rest of the budget.
  assign g    = (len[idx][i] <= t_bw) ? len[idx][i] : t_bw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      i       <= '0;
      j       <= '0;
      idx     <= '0;
      tmp_num <= '0;
      max_w   <= '0;
      sel     <= '0;
      t_bw    <= '0;
      mp_bw   <= '0;
      grant   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            t_bw  <= SLOT_W'(TOTAL_SLOTS);
            mp_bw <= '0;
            i     <= '0;
            grant <= '0;
            state <= S_PRI;
          end
        end
        // Set the budget of priority i.
        S_PRI: begin
          if (i == PW'(1)) begin
            mp_bw <= t_bw - (t_bw >> 1);
            t_bw  <= t_bw >> 1;
          end else if (i == PW'(2)) begin
            t_bw  <= t_bw + mp_bw;
          end
          sel     <= '0;
          tmp_num <= JW'(N_ONU);
          state   <= S_T11;
        end
        S_T11: begin
          j     <= '0;
          idx   <= '0;
          max_w <= '0;
          if (tmp_num != '0 && t_bw != '0) begin
            state <= S_SCAN;
          end else if (i == PW'(N_PRI - 1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            i     <= i + 1'b1;
            state <= S_PRI;
          end
        end
        // Find the unserved ONU with the largest weight at priority i.
        S_SCAN: begin
          if (!sel[j] && weight[j][i] >= max_w) begin
            max_w <= weight[j][i];
            idx   <= j;
          end
          if (j == JW'(N_ONU - 1)) state <= S_GRANT;
          else                     j     <= j + 1'b1;
        end
        S_GRANT: begin
          grant[idx][i] <= g;
          t_bw          <= t_bw - g;
          sel[idx]      <= 1'b1;
          tmp_num       <= tmp_num - 1'b1;
          state         <= S_T11;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
