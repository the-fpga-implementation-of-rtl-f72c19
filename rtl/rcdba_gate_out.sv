// rcdba_gate_out: gate-frame output stage of the RC-DBA scheduler.
//
// After a one-cycle start pulse the stage emits N_ONU gate frames on a
// valid/ready stream, ONU 0 first. Frame j carries DA = onu_addr[j] (the
// source address of that ONU's report), SA = OLT_ID, the gate opcode 0x0002
// and the High/Middle/Low grants of ONU j. done pulses for one cycle after
// the last frame is accepted.
//
// The frame layout is the design's reduced gate format; the OLT address 5 and
// the opcode value are those of the reference run. The streaming handshake
// and ONU order are this implementation's choices.
//
// Timing: gate_valid rises the cycle after start; one frame per clock while
// gate_ready is high. gate_data is held while gate_valid && !gate_ready.
//
// The SA and opcode bits of gate_data are constants by construction; the
// frame carries them so that the host sees a complete gate frame.
module rcdba_gate_out
  import rcdba_pkg::*;
#(
  parameter int unsigned N_ONU  = 5,
  parameter int unsigned OLT_ID = 5
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  slot_t [N_ONU-1:0][N_PRI-1:0]  grant,
  input  addr_t [N_ONU-1:0]             onu_addr,
  output logic                          gate_valid,
  input  logic                          gate_ready,
  output gate_t                         gate_data,
  output logic                          done
);

  localparam int unsigned JW = (N_ONU > 1) ? $clog2(N_ONU) : 1;

  logic [JW-1:0] j;

  always_comb begin
    gate_data.da     = onu_addr[j];
    gate_data.sa     = ADDR_W'(OLT_ID);
    gate_data.opcode = GATE_OPCODE;
    gate_data.high   = grant[j][0];
    gate_data.mid    = grant[j][1];
    gate_data.low    = grant[j][2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_valid <= 1'b0;
      j          <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!gate_valid) begin
        if (start) begin
          j          <= '0;
          gate_valid <= 1'b1;
        end
      end else if (gate_ready) begin
        if (j == JW'(N_ONU - 1)) begin
          gate_valid <= 1'b0;
          done       <= 1'b1;
        end else begin
          j <= j + 1'b1;
        end
      end
    end
  end

  // A presented frame must stay unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           gate_valid && !gate_ready |=> gate_valid && $stable(gate_data));

endmodule
