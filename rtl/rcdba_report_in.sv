// rcdba_report_in: report-frame input stage of the RC-DBA scheduler.
//
// After a one-cycle start pulse the stage accepts N_ONU report frames, one per
// handshake on a valid/ready stream, and files frame j (in arrival order) as
// ONU j: its three request fields go to the length registers len[j][p] and its
// source address to onu_addr[j], which the gate stage later uses as the
// destination. A request field whose Bitmap bit is clear is stored as zero
// (bit 0 qualifies High, bit 1 Middle, bit 2 Low). When the last frame is
// taken, done pulses for one cycle and the stage returns to idle.
//
// The idle state / start test / j-loop storing one frame per step follow the
// report-input ASM chart of the design; the valid/ready handshake, the bitmap
// qualification and the one-frame-per-cycle rate are this implementation's
// choices.
//
// Timing: at most one frame per clock; rpt_ready is high whenever the stage
// is collecting. The lengths are stable from done until the next start.
// The DA and Q_NUM fields of a report are not used: the scheduler serves a
// fixed set of N_ONU ONUs with three queues each.
module rcdba_report_in
  import rcdba_pkg::*;
#(
  parameter int unsigned N_ONU = 5
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic                              rpt_valid,
  output logic                              rpt_ready,
  input  report_t                           rpt_data,
  output logic                              done,
  output slot_t [N_ONU-1:0][N_PRI-1:0]      len,
  output addr_t [N_ONU-1:0]                 onu_addr
);

  localparam int unsigned JW = (N_ONU > 1) ? $clog2(N_ONU) : 1;

  typedef enum logic [0:0] {S_IDLE, S_RECV} state_t;

  state_t         state;
  logic [JW-1:0]  j;

  assign rpt_ready = (state == S_RECV);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      j        <= '0;
      done     <= 1'b0;
      len      <= '0;
      onu_addr <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            j     <= '0;
            state <= S_RECV;
          end
        end
        S_RECV: begin
          if (rpt_valid) begin
            len[j][0]   <= rpt_data.bitmap[0] ? rpt_data.high : '0;
            len[j][1]   <= rpt_data.bitmap[1] ? rpt_data.mid  : '0;
            len[j][2]   <= rpt_data.bitmap[2] ? rpt_data.low  : '0;
            onu_addr[j] <= rpt_data.sa;
            if (j == JW'(N_ONU - 1)) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              j <= j + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
