// olt_cpu_if: CPU interface logic between the host processor's static-memory
// bus and the RC-DBA scheduler.
//
// The host bus is 16 bits wide, so each 48-bit frame is moved as three 16-bit
// words: H = frame[47:32], M = frame[31:16], L = frame[15:0]. The block is a
// register file the host reads and writes, plus two small sequencers:
//   - report side: writing the L word of report j marks report j loaded; the
//     scheduler's report stream is fed from the loaded reports in order
//     0..N_ONU-1, each one leaving the "loaded" state when it is taken. The
//     host may load the reports before or after it starts the scheduler.
//   - gate side: every gate frame the scheduler emits is stored in the gate
//     registers of the next ONU (0..N_ONU-1), for the host to read back.
//
// Register map, word index = addr[7:2] (byte offset = 4 * index):
//   0                 CTRL   write: bit0 = 1 starts the scheduler (ignored
//                            while it is busy)
//                            read : bit0 done, bit1 busy, bit2 all reports loaded
//   1 + 3*(N_ONU-1-j) + w    report j, word w (0 = H, 1 = M, 2 = L), read/write
//   1 + 3*N_ONU + 3*(N_ONU-1-j) + w   gate j, word w, read only
// With N_ONU = 5 the L word of report 0 sits at byte offset 0x3C and the L word
// of gate 0 at 0x78, the offsets the host driver uses. The 16-bit word split
// and those two offsets follow the design; the rest of the map, the CTRL
// register and the loaded flags are this implementation's choices.
//
// Bus timing: cs_b, we_b and oe_b are active low. The chip is selected when
// cs_b is low and addr_hi equals HI_SEL. Strobes are brought into the clk
// domain through two flip-flops; a write is taken when the synchronised we_b
// is seen falling, using addr and data sampled one clk later than the
// strobe's first stage, so the host must hold we_b low, and addr/data stable,
// for at least three clk cycles. Reads are combinational: data_out is valid
// while the chip is selected, and data_oe (to the pad's tri-state buffer) is
// high while cs_b and oe_b are low.
// addr[1:0] select bytes within a 32-bit register slot and are ignored.
module olt_cpu_if
  import rcdba_pkg::*;
#(
  parameter int unsigned N_ONU  = 5,
  parameter logic [5:0]  HI_SEL = 6'h00
) (
  input  logic         clk,
  input  logic         rst_n,
  // host bus
  input  logic         cs_b,
  input  logic         we_b,
  input  logic         oe_b,
  input  logic [7:0]   addr,
  input  logic [5:0]   addr_hi,
  input  logic [15:0]  data_in,
  output logic [15:0]  data_out,
  output logic         data_oe,
  // scheduler control
  output logic         sch_start,
  input  logic         sch_busy,
  input  logic         sch_done,
  output logic         rpt_valid,
  input  logic         rpt_ready,
  output report_t      rpt_data,
  input  logic         gate_valid,
  output logic         gate_ready,
  input  gate_t        gate_data
);

  localparam int unsigned NREG = 1 + 6 * N_ONU;
  localparam int unsigned JW   = (N_ONU > 1) ? $clog2(N_ONU) : 1;

  initial assert (NREG <= 64) else $error("register map exceeds addr[7:2]");

  logic [N_ONU-1:0][2:0][15:0] r_reg;     // report words per ONU
  logic [N_ONU-1:0][2:0][15:0] g_reg;     // gate words per ONU
  logic [N_ONU-1:0]            loaded;
  logic [JW-1:0]               rp, gp;

  // Synchroniser and sampled bus.
  logic        cs_s1, cs_s2, we_s1, we_s2, we_s3;
  logic [7:0]  addr_s;
  logic [5:0]  hi_s;
  logic [15:0] data_s;
  logic        wr_ev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {cs_s1, cs_s2, we_s1, we_s2, we_s3} <= '1;
      addr_s <= '0;
      hi_s   <= '0;
      data_s <= '0;
    end else begin
      cs_s1  <= cs_b;  cs_s2 <= cs_s1;
      we_s1  <= we_b;  we_s2 <= we_s1;  we_s3 <= we_s2;
      addr_s <= addr;
      hi_s   <= addr_hi;
      data_s <= data_in;
    end
  end

  assign wr_ev = we_s3 && !we_s2 && !cs_s2 && (hi_s == HI_SEL);

  // Word index to (kind, ONU, word) decoding.
  function automatic logic [15:0] read_word(logic [5:0] idx);
    logic [15:0] v;
    v = '0;
    if (idx == 6'd0) v = {13'b0, &loaded, sch_busy, sch_done};
    for (int j = 0; j < N_ONU; j++)
      for (int w = 0; w < 3; w++) begin
        if (int'(idx) == 1 + 3*(N_ONU-1-j) + w)         v = r_reg[j][w];
        if (int'(idx) == 1 + 3*N_ONU + 3*(N_ONU-1-j) + w) v = g_reg[j][w];
      end
    return v;
  endfunction

  assign data_oe  = !cs_b && !oe_b && (addr_hi == HI_SEL);
  assign data_out = read_word(addr[7:2]);

  assign rpt_valid  = loaded[rp];
  assign rpt_data   = report_t'({r_reg[rp][0], r_reg[rp][1], r_reg[rp][2]});
  assign gate_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_reg     <= '0;
      g_reg     <= '0;
      loaded    <= '0;
      rp        <= '0;
      gp        <= '0;
      sch_start <= 1'b0;
    end else begin
      sch_start <= 1'b0;
      // report taken by the scheduler
      if (rpt_valid && rpt_ready) begin
        loaded[rp] <= 1'b0;
        rp         <= (rp == JW'(N_ONU - 1)) ? '0 : rp + 1'b1;
      end
      // gate frame from the scheduler
      if (gate_valid) begin
        g_reg[gp][0] <= gate_data[47:32];
        g_reg[gp][1] <= gate_data[31:16];
        g_reg[gp][2] <= gate_data[15:0];
        gp        <= (gp == JW'(N_ONU - 1)) ? '0 : gp + 1'b1;
      end
      // host write
      if (wr_ev) begin
        if (addr_s[7:2] == 6'd0) begin
          if (data_s[0] && !sch_busy) begin
            sch_start <= 1'b1;
            rp        <= '0;
            gp        <= '0;
          end
        end
        for (int j = 0; j < N_ONU; j++)
          for (int w = 0; w < 3; w++)
            if (int'(addr_s[7:2]) == 1 + 3*(N_ONU-1-j) + w) begin
              r_reg[j][w] <= data_s;
              if (w == 2) loaded[j] <= 1'b1;
            end
      end
    end
  end

endmodule
