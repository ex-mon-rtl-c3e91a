// exmon_pkg: types and constants shared by the Ex-Mon extraction hardware.
//
// An event is one lookup presented to the extraction table: either the PC
// of a committing instruction (I/D flag = I) or the data address of a
// committing memory instruction (I/D flag = D), together with the value the
// monitor receives (the instruction's result, or the value loaded/stored).
// A forwarded event becomes a packet of the communication queue with the
// three fields Address, I/D flag and Value.
//
// The DIRECTION word read out of a matched extraction-table entry holds a
// valid bit, a suspension bit and the two type bits ONCE and FLUSH that
// steer the local filter.  Field widths beyond these four bits, the packet
// slot size in memory and the register map of the configuration port are
// choices of this implementation.
package exmon_pkg;

  localparam int unsigned AW = 32;           // address width (PC and data)
  localparam int unsigned DW = 32;           // value width
  localparam int unsigned PKT_BYTES = 16;    // one packet slot in the queue

  typedef enum logic {
    ID_I = 1'b0,   // instruction address (PC)
    ID_D = 1'b1    // data address
  } id_flag_e;

  // DIRECTION word of one extraction-table entry.
  typedef struct packed {
    logic valid;   // entry is in use; a match is reported only if set
    logic susp;    // matching this entry suspends the extraction table
    logic once;    // type bit: forward only once, then enter the local filter
    logic flush;   // type bit: clear the local filter
  } direction_t;

  // TAG word of one extraction-table entry (ternary key).
  typedef struct packed {
    logic [AW-1:0] key;   // address key
    logic [AW-1:0] care;  // 1 = bit compared, 0 = "X" (don't care)
    id_flag_e      id;    // I/D flag of the key
  } tag_t;

  typedef struct packed {
    tag_t       tag;
    direction_t dir;
  } table_entry_t;

  // Packet written to the communication queue.
  typedef struct packed {
    logic [AW-1:0] addr;
    id_flag_e      id;
    logic [DW-1:0] value;
  } packet_t;

  // One committing instruction, as read from the ROB and load/store queue.
  typedef struct packed {
    logic [AW-1:0] pc;         // PC of the committing instruction
    logic [DW-1:0] result;     // its result
    logic          is_mem;     // it is a load or a store
    logic [AW-1:0] mem_addr;   // data address accessed
    logic [DW-1:0] mem_value;  // value loaded or stored
  } commit_t;

  // Software-visible registers of the extraction logic.
  typedef enum logic [2:0] {
    REG_BASE = 3'd0,   // communication queue base address
    REG_END  = 3'd1,   // communication queue end address (exclusive)
    REG_HEAD = 3'd2,   // next free slot (written by hardware, initialised by software)
    REG_TAIL = 3'd3,   // next slot the monitor will consume (written by software)
    REG_SUSP = 3'd4    // suspension register (bit 0)
  } reg_sel_e;

endpackage
