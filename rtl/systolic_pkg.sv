// systolic_pkg: types shared by the linear systolic arrays (priority
// queue, queue, stack) and the tree machines.
//
// A key register holds a kind tag and a value.  The tag orders keys so that
// minus infinity < every finite key < plus infinity when the packed
// {kind, value} word is compared as an unsigned number; plus infinity also
// marks an empty register, as in the document.  The command and mode
// encodings are this design's choice.
package systolic_pkg;
  typedef enum logic [1:0] {
    KIND_NEG_INF = 2'd0,
    KIND_KEY     = 2'd1,
    KIND_POS_INF = 2'd2
  } key_kind_e;

  // Which program the cells of a linear array run (document, Section 2).
  typedef enum logic [1:0] {
    LIN_PQUEUE = 2'd0,  // priority queue: INSERT / XMIN
    LIN_QUEUE  = 2'd1,  // first-in first-out queue: ENQUEUE / DEQUEUE
    LIN_STACK  = 2'd2   // stack: PUSH / POP
  } lin_mode_e;

  // Command at the IO pad.  PUT is INSERT / ENQUEUE / PUSH, TAKE is
  // XMIN / DEQUEUE / POP.
  typedef enum logic [1:0] {
    CMD_NOP  = 2'd0,
    CMD_PUT  = 2'd1,
    CMD_TAKE = 2'd2
  } lin_cmd_e;

  // Commands of the tree-based dictionaries (document, Section 3).
  typedef enum logic [2:0] {
    DCMD_NOP    = 3'd0,
    DCMD_MEMBER = 3'd1,
    DCMD_INSERT = 3'd2,
    DCMD_DELETE = 3'd3,
    DCMD_XMIN   = 3'd4
  } dict_cmd_e;
endpackage
