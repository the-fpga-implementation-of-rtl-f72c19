// rcdba_weight: RC-DBA weight calculation.
//
// Every (ONU, priority) queue owns a weight register. For each priority p in
// turn (High, Middle, Low) one start pulse runs two phases:
//   1. Request pass: for j = 0..N_ONU-1, one ONU per clock, copy len[j][p]
//      into a scratch register tmp_len[j]; if it is non-zero, add N_ONU to the
//      weight and count the requester in tmp_num.
//   2. Ranking passes: while tmp_num != 0, scan all ONUs (one per clock) for
//      the largest tmp_len using ">=", so that among equal requests the
//      highest-numbered ONU wins; then clear that tmp_len, add tmp_num to its
//      weight and decrement tmp_num.
// So with k requesters the largest request gets +N_ONU+k, the next
// +N_ONU+k-1 and the smallest +N_ONU+1. Weights accumulate from run to run and
// saturate at all ones; wclr (applied only while idle) clears the weights of
// the selected queues, which the scheduler uses for queues that were granted
// in full.
//
// The two phases, the ">=" comparison and the per-ONU scan follow the
// weight-calculation ASM chart of the design. The weight width, saturation and
// the clearing rule are this implementation's choices.
//
// Timing: a run takes N_PRI * (N_ONU + 1 + k_p * (N_ONU + 1)) + 1 cycles
// roughly, with k_p requesters at priority p; done pulses for one cycle at
// the end.
module rcdba_weight
  import rcdba_pkg::*;
#(
  parameter int unsigned N_ONU = 5,
  parameter int unsigned W_W   = 8
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 start,
  input  slot_t [N_ONU-1:0][N_PRI-1:0]         len,
  input  logic  [N_ONU-1:0][N_PRI-1:0]         wclr,
  output logic  [N_ONU-1:0][N_PRI-1:0][W_W-1:0] weight,
  output logic                                 busy,
  output logic                                 done
);

  localparam int unsigned JW = $clog2(N_ONU + 1);
  localparam int unsigned PW = 2;

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_T11, S_SCAN, S_T14} state_t;

  state_t                  state;
  logic [PW-1:0]           p;
  logic [JW-1:0]           j;
  logic [JW-1:0]           tmp_num;
  logic [JW-1:0]           idx;
  slot_t                   max_len;
  slot_t [N_ONU-1:0]       tmp_len;

  // Saturating weight addition.
  function automatic logic [W_W-1:0] sat_add(logic [W_W-1:0] a, logic [JW:0] b);
    logic [W_W:0] s;
    s = {1'b0, a} + (W_W+1)'(b);
    return s[W_W] ? '1 : s[W_W-1:0];
  endfunction

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      p       <= '0;
      j       <= '0;
      tmp_num <= '0;
      idx     <= '0;
      max_len <= '0;
      tmp_len <= '0;
      weight  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          for (int o = 0; o < N_ONU; o++)
            for (int q = 0; q < N_PRI; q++)
              if (wclr[o][q]) weight[o][q] <= '0;
          if (start) begin
            p       <= '0;
            j       <= '0;
            tmp_num <= '0;
            state   <= S_REQ;
          end
        end
        // Request pass: one ONU per clock.
        S_REQ: begin
          tmp_len[j] <= len[j][p];
          if (len[j][p] != '0) begin
            weight[j][p] <= sat_add(weight[j][p], (JW+1)'(N_ONU));
            tmp_num      <= tmp_num + 1'b1;
          end
          if (j == JW'(N_ONU - 1)) state <= S_T11;
          else                     j     <= j + 1'b1;
        end
        // Any requester left to rank at this priority?
        S_T11: begin
          j       <= '0;
          max_len <= '0;
          idx     <= '0;
          if (tmp_num != '0) begin
            state <= S_SCAN;
          end else if (p == PW'(N_PRI - 1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            p     <= p + 1'b1;
            state <= S_REQ;
          end
        end
        // Search for the largest remaining request.
        S_SCAN: begin
          if (tmp_len[j] >= max_len) begin
            max_len <= tmp_len[j];
            idx     <= j;
          end
          if (j == JW'(N_ONU - 1)) state <= S_T14;
          else                     j     <= j + 1'b1;
        end
        // Rank it: add the remaining requester count to its weight.
        S_T14: begin
          tmp_len[idx]   <= '0;
          weight[idx][p] <= sat_add(weight[idx][p], {1'b0, tmp_num});
          tmp_num        <= tmp_num - 1'b1;
          state          <= S_T11;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
