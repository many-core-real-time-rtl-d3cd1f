// Shared types and constants of the NPRC I/O system.
//
// Every link in the system (router home port, I/O-Ring port, NPRC-CC port)
// carries 32-bit flits, the width of a mesh router port. A flit has a
// `last` marker that closes a packet; valid and ready travel next to it.
// The first flit of every packet sent to an NPRC-CC is a header whose top
// nibble is a command (cmd_e). The command set, the packet layout, the
// time-slot-table entry layout and the I/O operation word layout are this
// design's own choices: the controller's behaviour (pre-loaded periodic
// requests, time slot table, HRT/SRT sporadic pools) follows the
// architecture, the bit layouts do not come from it.
package nprc_pkg;

  localparam int unsigned FLIT_W = 32;

  typedef struct packed {
    logic              last;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Header command, bits [31:28] of the first flit of a packet.
  //  CMD_PWRITE : [15:0] first P-space word address; each payload flit is
  //               written to the next address.
  //  CMD_TWRITE : [15:0] first time-slot-table index; each payload flit is
  //               one tst_entry_t.
  //  CMD_SPOR   : sporadic request. [24] class (1 = HRT, 0 = SRT),
  //               [7:0] priority (larger is more urgent); each payload flit
  //               is one I/O operation queued with that priority.
  //  CMD_CTRL   : single flit. [24] run, [22:16] number of used time slots,
  //               [15:0] hyper-period length in timer ticks.
  typedef enum logic [3:0] {
    CMD_NOP    = 4'h0,
    CMD_PWRITE = 4'h1,
    CMD_TWRITE = 4'h2,
    CMD_SPOR   = 4'h3,
    CMD_CTRL   = 4'h4
  } cmd_e;

  // Kind of a time slot table row.
  typedef enum logic [1:0] {
    SLOT_FREE = 2'd0,   // start of a stretch of free time (no reservation)
    SLOT_P    = 2'd1,   // periodic request, pre-loaded in P-space
    SLOT_HRT  = 2'd2    // budget reserved for a hard real-time sporadic request
  } slot_type_e;

  // One time slot table row (32 bits). req_id is the P-space word address
  // of the request header for SLOT_P rows and unused otherwise.
  typedef struct packed {
    slot_type_e  typ;
    logic [13:0] req_id;
    logic [15:0] start;
  } tst_entry_t;

  localparam int unsigned PRIO_W = 8;

  // A queued sporadic I/O request: one I/O operation and its priority.
  typedef struct packed {
    logic [PRIO_W-1:0] prio;
    logic [31:0]       op;
  } spor_req_t;

  // I/O operation word: bit 31 set means the device answers (a read) and
  // the answer is returned on the response path.
  localparam int unsigned OP_READ_BIT = 31;

endpackage
