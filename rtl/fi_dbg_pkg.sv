// fi_dbg_pkg: types and constants shared by the fault-injection debugger.
//
// Command set: the eleven commands and their parameters follow the debugger
// command table (HALT, RUN, RESET, DRESET, DCONFIG, WAIT, WAITFOR, READRAM,
// WRITERAM, READREG, WRITEREG). Their binary encoding is this design's own:
// a command is one opcode byte (opcode in bits 3:0, bits 7:4 zero) followed
// by its parameter bytes, least significant byte first:
//   <address>  ADDR_W/8 bytes        (READRAM, WRITERAM)
//   <address>  1 byte                (READREG, WRITEREG: register number)
//   <data>     1 byte                (WRITERAM, WRITEREG)
//   <time>     TIME_W/8 bytes        (WAIT, WAITFOR; WAITFOR time 0 = no timeout)
//   <event>    1 byte                (WAITFOR, sent before <time>)
//   <code>     1 byte                (DCONFIG)
// Opcodes not in the table are skipped as one-byte no-operations.
//
// Messages: every message starts with a 6-bit transfer code (TCODE) as in
// NEXUS, followed by its payload fields, sent least significant bit first.
// The TCODE values and the field layouts below are this design's choice.
package fi_dbg_pkg;

  typedef enum logic [3:0] {
    OP_NOP      = 4'h0,
    OP_HALT     = 4'h1,
    OP_RUN      = 4'h2,
    OP_RESET    = 4'h3,
    OP_DRESET   = 4'h4,
    OP_DCONFIG  = 4'h5,
    OP_WAIT     = 4'h6,
    OP_WAITFOR  = 4'h7,
    OP_READRAM  = 4'h8,
    OP_WRITERAM = 4'h9,
    OP_READREG  = 4'hA,
    OP_WRITEREG = 4'hB
  } opcode_e;

  localparam int TCODE_W = 6;

  // Debugger -> OCD (MDI)
  localparam logic [5:0] TC_RUN_CTRL  = 6'd56; // payload: 2-bit run-control code
  localparam logic [5:0] TC_MEM_READ  = 6'd57; // payload: address
  localparam logic [5:0] TC_MEM_WRITE = 6'd58; // payload: address, data
  localparam logic [5:0] TC_REG_READ  = 6'd59; // payload: 8-bit register number
  localparam logic [5:0] TC_REG_WRITE = 6'd60; // payload: register number, data
  // OCD -> debugger (MDO)
  localparam logic [5:0] TC_STATUS     = 6'd0;  // debug status
  localparam logic [5:0] TC_PROG_TRACE = 6'd3;  // payload: instruction address
  localparam logic [5:0] TC_DATA_WRITE = 6'd5;  // payload: address, data
  localparam logic [5:0] TC_ERROR      = 6'd8;  // payload: error code (e.g. trace overflow)
  localparam logic [5:0] TC_WATCHPOINT = 6'd15; // payload: watchpoint number
  localparam logic [5:0] TC_READ_DATA  = 6'd61; // payload: data read (memory or register)

  // Run-control codes carried by TC_RUN_CTRL
  localparam logic [1:0] RC_RUN   = 2'd0;
  localparam logic [1:0] RC_RESET = 2'd2;

  // WAITFOR <event> byte: bit 7 = watchpoint hit pin (EVTO),
  // bit 6 = a message whose TCODE equals bits 5:0 (6'h3F: any message).
  localparam logic [5:0] TC_ANY = 6'h3F;

  // DCONFIG <code> bits: which records go to the output memory.
  localparam int CFG_STORE_RESP  = 0; // read responses (TC_READ_DATA)
  localparam int CFG_STORE_TRACE = 1; // every other message from the OCD
  localparam int CFG_STORE_EVENT = 2; // WAITFOR outcome records (hit / timeout)
  localparam logic [7:0] CFG_DEFAULT = 8'h07;

  // Output record kinds (bits [REC_W-1 -: 2] of a record)
  typedef enum logic [1:0] {
    REC_MSG     = 2'd0, // {kind, tcode, payload}
    REC_HIT     = 2'd1, // {kind, 6'0, cycles waited}
    REC_TIMEOUT = 2'd2  // {kind, 6'0, cycles waited}
  } rec_kind_e;

endpackage
