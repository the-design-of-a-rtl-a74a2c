// x86_pkg: types and constants shared by the processor, its caches and the
// system bus.
//
// The system bus is 128 data bits, 15 address bits and a control bus of
// BBSY, a 2-bit device id, ACK and BRW (plus interrupt lines, which are
// carried separately). The device ids 01 (memory), 10 (keyboard) and
// 11 (monitor) follow the controller state diagrams; 00 means "no device".
// The bus has no tri-state drivers here: every master drives zero while it
// does not own the bus and the top ORs the masters together, and likewise
// for the slaves. BRW = 1 for a write is a choice of this design.
package x86_pkg;

  localparam int unsigned BUS_DATA_W = 128;
  localparam int unsigned BUS_ADDR_W = 15;

  typedef enum logic [1:0] {
    DEV_NONE     = 2'b00,
    DEV_MEMORY   = 2'b01,
    DEV_KEYBOARD = 2'b10,
    DEV_MONITOR  = 2'b11
  } dev_id_e;

  // What the bus owner drives.
  typedef struct packed {
    logic                  bbsy;
    dev_id_e               dev_id;
    logic                  brw;     // 1 = write, 0 = read
    logic [BUS_ADDR_W-1:0] addr;
    logic [BUS_DATA_W-1:0] data;
  } bus_m_t;

  // What the addressed slave drives.
  typedef struct packed {
    logic                  ack;
    logic [BUS_DATA_W-1:0] data;
  } bus_s_t;

  // Operand size, as in the decoder's operand_mode signal.
  typedef enum logic [1:0] {
    SZ8  = 2'd0,
    SZ16 = 2'd1,
    SZ32 = 2'd2
  } opsize_e;

  // Operations of the execution stage (the selection unit of the
  // execution stage picks one of these units' results).
  typedef enum logic [3:0] {
    OP_ADD,
    OP_XOR,
    OP_INC,
    OP_BSWAP,
    OP_BTS,
    OP_ROR,
    OP_SAL,
    OP_SAR,
    OP_MOV,
    OP_XCHG,
    OP_STACK
  } exop_e;

  // Flags: the seven the decoder can write (Table of control signals).
  typedef struct packed {
    logic af;
    logic cf;
    logic df;
    logic of_;
    logic pf;
    logic sf;
    logic zf;
  } flags_t;

  // A register write carried to the writeback stage: the new value in its
  // low 8/16/32 bits, the whole old register value (read in the register
  // read stage) to merge a partial write into, the register id and size.
  typedef struct packed {
    logic        en;
    logic [2:0]  id;
    opsize_e     size;
    logic [31:0] value;
    logic [31:0] old;
  } regwr_t;

  // Exception/interrupt vectors: page fault and general protection as in
  // x86; the keyboard's interrupt (INT1) uses service routine 0, INT2 uses 1.
  localparam logic [7:0] VEC_PF   = 8'd14;
  localparam logic [7:0] VEC_GP   = 8'd13;
  localparam logic [7:0] VEC_INT1 = 8'd0;
  localparam logic [7:0] VEC_INT2 = 8'd1;

endpackage
