// plc_pkg: types and constants shared by the PLC System IP.
//
// The PLC program is a MELSEC-style instruction list executed on a stack
// machine: an accumulator (Acc) plus an accumulator stack. Only the three
// instructions the design is specified for are encoded here:
//   LD  dev  - push Acc onto the stack, then Acc = dev
//   ANI dev  - Acc = Acc AND NOT dev
//   OUT dev  - dev = Acc
// A device is a 1-bit relay, either an input relay X or an output relay Y.
// Relays live in one flat relay image: X0..X(N_X-1) at indices 0..N_X-1,
// followed by Y0..Y(N_Y-1). The encoding of instructions, the device
// numbering width and the sizes below are this design's own choices.
package plc_pkg;

  typedef enum logic [1:0] {
    OP_LD  = 2'd0,
    OP_ANI = 2'd1,
    OP_OUT = 2'd2,
    OP_NOP = 2'd3
  } opcode_e;

  typedef enum logic {
    DEV_X = 1'b0,
    DEV_Y = 1'b1
  } device_e;

  localparam int unsigned DEV_NUM_W = 8;

  typedef struct packed {
    opcode_e               op;
    device_e               dev;
    logic [DEV_NUM_W-1:0]  num;
  } instr_t;

  // Default relay image size (16 X relays and 16 Y relays).
  localparam int unsigned N_X_DEFAULT = 16;
  localparam int unsigned N_Y_DEFAULT = 16;

  // AXI4-Stream beat: 16 bits carrying two 8-bit chars, one relay per char.
  localparam int unsigned AXIS_W = 16;
  localparam int unsigned CHAR_W = 8;
  localparam int unsigned CHARS_PER_BEAT = AXIS_W / CHAR_W;

  // AXI4-Lite register map (byte offsets).
  localparam logic [5:0] REG_CTRL = 6'h00;  // [0] start, [1] done, [2] idle
  localparam logic [5:0] REG_GIE  = 6'h04;  // [0] global interrupt enable
  localparam logic [5:0] REG_IER  = 6'h08;  // [0] done interrupt enable
  localparam logic [5:0] REG_ISR  = 6'h0C;  // [0] done interrupt status, write 1 to clear

  // Flat relay index of a device operand.
  function automatic int unsigned relay_index(device_e dev, logic [DEV_NUM_W-1:0] num,
                                              int unsigned n_x);
    return (dev == DEV_Y) ? n_x + int'(num) : int'(num);
  endfunction

endpackage
