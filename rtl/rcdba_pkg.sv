// rcdba_pkg: types and constants shared by the RC-DBA OLT scheduler.
//
// The scheduler exchanges two reduced MPCP control frames, both 48 bits wide:
//   report (ONU -> OLT): DA(4) SA(4) Q_NUM(8) Bitmap(8) High(8) Middle(8) Low(8)
//   gate   (OLT -> ONU): DA(4) SA(4) Opcode(16)         High(8) Middle(8) Low(8)
// The field order and widths follow the reduced frame format of the design;
// the field values used on the bus (OLT address 5, gate opcode 0x0002,
// Q_NUM 3, Bitmap 0x07) are those of the reference test run.
// Priority index 0 is High, 1 is Middle, 2 is Low throughout the design.
package rcdba_pkg;

  // Number of priority queues per ONU; fixed by the three request/grant
  // fields of the frame format.
  localparam int unsigned N_PRI = 3;

  localparam int unsigned SLOT_W  = 8;   // width of one request / grant field
  localparam int unsigned ADDR_W  = 4;   // width of DA and SA

  localparam logic [15:0] GATE_OPCODE = 16'h0002;

  typedef logic [SLOT_W-1:0] slot_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef struct packed {
    addr_t       da;
    addr_t       sa;
    logic [7:0]  q_num;
    logic [7:0]  bitmap;
    slot_t       high;
    slot_t       mid;
    slot_t       low;
  } report_t;

  typedef struct packed {
    addr_t       da;
    addr_t       sa;
    logic [15:0] opcode;
    slot_t       high;
    slot_t       mid;
    slot_t       low;
  } gate_t;

endpackage
