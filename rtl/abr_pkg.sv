// abr_pkg: types and constants shared by the ABR scheduler blocks.
//
// Flow groups are identified by an id below N_FG. Service times and service
// intervals are fixed-point values in virtual-time units with SI_INT_W integer
// and SI_FRAC_W fractional bits (one virtual-time unit is N_FG clock cycles).
// A cell carries 52 bytes on the utopia links (four header bytes and 48
// payload bytes, no HEC), i.e. 26 16-bit words, 52 8-bit words or seven
// 64-bit words in the cell FIFOs (the last 64-bit word holds the final four
// bytes in its upper half). The widths are choices of this design where the
// document gives none; the 22-bit cell pointer and 2-bit pointer status
// come from the document.
package abr_pkg;

  localparam int unsigned SI_INT_W  = 16;
  localparam int unsigned SI_FRAC_W = 8;
  localparam int unsigned SI_W      = SI_INT_W + SI_FRAC_W;
  localparam int unsigned BO_W      = 8;
  localparam int unsigned PTR_W     = 22;

  localparam int unsigned CELL_BYTES   = 52;
  localparam int unsigned CELL_WORDS16 = CELL_BYTES / 2;
  localparam int unsigned CELL_WORDS64 = (CELL_BYTES + 7) / 8;

  // One service interval of 1.0 virtual-time unit: the fastest speed.
  localparam logic [SI_W-1:0] SI_ONE = SI_W'(1) << SI_FRAC_W;

  // Status of the cell pointer the sender keeps for every flow group.
  typedef enum logic [1:0] {
    PS_INVALID = 2'b00,  // last cell sent: dequeue a new one
    PS_VALID   = 2'b01,  // last cell failed on the bus: read it again
    PS_UNKNOWN = 2'b10   // cell handed to the bus, outcome not known yet
  } ptr_status_e;

  // Request the sender places in front of the queue manager.
  typedef enum logic {
    QM_DEQUEUE = 1'b0,   // new cell of flow group (operand is a flow group id)
    QM_READ    = 1'b1    // read again a kept cell (operand is a cell pointer)
  } qm_op_e;

  // Kind of cell handed to the forwarder.
  typedef enum logic {
    CL_DATA = 1'b0,
    CL_CTRL = 1'b1
  } cell_type_e;

  // Back-off state of one flow group.
  typedef struct packed {
    logic [BO_W-1:0] amount;   // current back-off amount (0, 1, 2, 4, ...)
    logic [BO_W-1:0] counter;  // service times still to skip
  } backoff_t;

  // Congestion and negative-acknowledge flags of one flow group.
  typedef struct packed {
    logic cong;
    logic nack;
  } congnack_t;

endpackage
