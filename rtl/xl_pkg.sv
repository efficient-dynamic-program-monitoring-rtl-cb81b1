// xl_pkg: shared types and constants of the extraction logic.
//
// The extraction logic sits beside the commit stage of each core and copies
// selected execution information (results, referenced memory addresses, PCs)
// of a monitored program into a communication queue in shared memory, where a
// monitor running on another core reads it.  This package holds the widths,
// the configuration register map, the queue message kinds and the record
// that the commit stage hands to the extraction logic.
//
// From the design description: 8-byte queue entries (item address = QBR +
// RQR, RQR advanced by forward_bit << 3), 4-byte SPARC instructions, the two
// modes (table-driven and forward-bit) and the I/D flag.  The register map,
// the message-kind tag and the 32-bit physical address width are choices of
// this implementation.
package xl_pkg;

  localparam int unsigned ADDR_W     = 32;  // physical / virtual address width
  localparam int unsigned DATA_W     = 64;  // SPARC-v9 result width = 8-byte entry
  localparam int unsigned TYPE_W     = 4;   // DIRECTION type bits per table entry
  localparam int unsigned ENTRY_BYTES = 8;  // queue entry size (RQR step)
  localparam int unsigned ENTRY_SHIFT = 3;  // log2(ENTRY_BYTES)

  // I/D flag of a table lookup / table entry
  localparam logic FLAG_I = 1'b1;
  localparam logic FLAG_D = 1'b0;

  // Extraction modes
  typedef enum logic {
    MODE_TABLE = 1'b0,   // table-driven mode
    MODE_FBIT  = 1'b1    // forward-bit mode
  } xl_mode_e;

  // What a queue entry carries (kept with the full/empty bit of the entry)
  typedef enum logic [1:0] {
    MSG_VALUE  = 2'd0,   // result of a non-memory instruction
    MSG_MADDR  = 2'd1,   // referenced memory address of a memory instruction
    MSG_TRACE  = 2'd2    // table bypassed: {PC, data address} of every instruction
  } xl_msg_e;

  // One queue message: 8-byte payload plus a small tag
  typedef struct packed {
    xl_msg_e             kind;
    logic                upd;     // this instruction suspended the table: update it
    logic [TYPE_W-1:0]   ttype;   // DIRECTION type bits (table mode), 0 otherwise
    logic [DATA_W-1:0]   payload;
  } xl_msg_t;

  // One committing instruction as seen at the commit stage (ROB + LSQ)
  typedef struct packed {
    logic [ADDR_W-1:0] pc;
    logic              is_mem;  // load or store: daddr is meaningful
    logic [ADDR_W-1:0] daddr;
    logic [DATA_W-1:0] result;
  } xl_commit_t;

  // Ternary CAM entry: compare bit i only where care[i] is 1 ("X" where 0)
  typedef struct packed {
    logic              used;    // entry holds a tag
    logic              id;      // I/D flag
    logic [ADDR_W-1:0] tag;
    logic [ADDR_W-1:0] care;
  } xl_tag_t;

  // DIRECTION word of one entry
  typedef struct packed {
    logic              valid;   // forward the matching instruction
    logic              susp;    // matching suspends the table (update follows)
    logic [TYPE_W-1:0] ttype;   // type bits handed to the monitor
  } xl_dir_t;

  // Configuration register map (word addresses on the configuration port)
  localparam logic [7:0] CFG_CTRL     = 8'h00; // [0] enable, [1] mode (1 = forward-bit)
  localparam logic [7:0] CFG_SUSP     = 8'h01; // [0] suspension register
  localparam logic [7:0] CFG_ABR      = 8'h02; // annotation base register
  localparam logic [7:0] CFG_CMASK    = 8'h03; // PC mask giving the code-section offset
  localparam logic [7:0] CFG_QBR      = 8'h04; // queue base register
  localparam logic [7:0] CFG_RQR      = 8'h05; // rotating offset register
  localparam logic [7:0] CFG_TAG      = 8'h06; // staged tag: [32] I/D flag, [31:0] tag
  localparam logic [7:0] CFG_CARE     = 8'h07; // staged care mask (0 bits = "X")
  localparam logic [7:0] CFG_TBLWR    = 8'h08; // [31:16] index, [8] used, [7] valid,
                                               // [6] susp, [3:0] type: write entry
  localparam logic [7:0] CFG_LIB_BASE = 8'h10; // 8'h10 + r: library region r base
  localparam logic [7:0] CFG_LIB_LIM  = 8'h18; // 8'h18 + r: library region r limit (excl.)

endpackage
