// glue_pkg: types and constants shared by the coherent memory hierarchy.
//
// The hierarchy is a directory-based MESI system: private write-back L2 caches
// (one per processor) talk over a three-plane network to a shared, inclusive
// L3 that holds the directory and fronts main memory. All caches exchange one
// message format, msg_t, which is also the "common form" that every cache's
// interfaces put incoming requests into before they reach the serializer.
//
// Planes: the request plane carries L2 -> L3 requests (GETS, GETM, PUTS, PUTM,
// and non-cacheable NC_RD/NC_WR); the forward plane carries L3 -> L2
// directives (FWD_GETS, FWD_GETM, INV, PUT_ACK); the response plane carries
// data and acknowledgements (DATA, DATA_DIR, INV_ACK, NC_DATA).
//
// The message names follow the usual MESI directory vocabulary; field widths,
// node numbering and encodings are this design's own choices.
package glue_pkg;

  // Default sizes. The 4 processors and 8-way L2 come from the document; the
  // rest (32-bit addresses, 16-byte lines, 64 sets) are chosen here. The L3
  // has the same number of sets as an L2 and NUM_L2*L2_WAYS ways, so it can
  // hold every line the L2s hold and never has to recall one.
  localparam int unsigned NUM_L2     = 4;
  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned WORD_W     = 32;
  localparam int unsigned LINE_WORDS = 4;
  localparam int unsigned LINE_W     = WORD_W * LINE_WORDS;
  localparam int unsigned OFF_W      = $clog2(LINE_WORDS * WORD_W / 8);
  localparam int unsigned LADDR_W    = ADDR_W - OFF_W;   // line address
  localparam int unsigned L2_SETS    = 64;
  localparam int unsigned L2_WAYS    = 8;
  localparam int unsigned L3_WAYS    = NUM_L2 * L2_WAYS;
  localparam int unsigned ID_W       = 3;                 // node id on the network
  localparam logic [ID_W-1:0] L3_ID  = ID_W'(NUM_L2);     // L2s are 0..NUM_L2-1
  localparam int unsigned MEM_TAG_W  = 4;

  typedef logic [LINE_W-1:0]  line_t;
  typedef logic [LADDR_W-1:0] laddr_t;
  typedef logic [ID_W-1:0]    node_t;

  typedef enum logic [4:0] {
    M_NONE,
    // frontend (processor side), after conversion to the common form
    M_CPU_RD, M_CPU_WR, M_CPU_FLUSH,
    // request plane, L2 -> L3
    M_GETS, M_GETM, M_PUTS, M_PUTM, M_NC_RD, M_NC_WR,
    // forward plane, L3 -> L2
    M_FWD_GETS, M_FWD_GETM, M_INV, M_PUT_ACK,
    // response plane
    M_DATA, M_DATA_DIR, M_INV_ACK, M_NC_DATA
  } msg_type_t;

  typedef struct packed {
    msg_type_t             mtype;
    node_t                 src;
    node_t                 dst;
    laddr_t                addr;
    line_t                 data;
    logic [LINE_WORDS-1:0] wmask;  // words written (CPU_WR, NC_WR)
    logic                  excl;   // DATA: grants exclusive (E or M) permission
    logic                  dirty;  // PUTM / DATA_DIR: data differs from the L3 copy
  } msg_t;

  // Processor (L1) side of an L2.
  typedef enum logic [1:0] {CPU_READ, CPU_WRITE, CPU_FLUSH} cpu_op_t;

  typedef struct packed {
    cpu_op_t              op;
    logic                 cacheable;
    logic [ADDR_W-1:0]    addr;
    logic [WORD_W-1:0]    wdata;
  } cpu_req_t;

  typedef struct packed {
    cpu_op_t   op;      // which request this answers
    line_t     data;    // CPU_READ: the whole line holding the address
  } cpu_rsp_t;

  // Main-memory side of the L3.
  typedef struct packed {
    logic                  write;
    laddr_t                addr;
    line_t                 data;
    logic [LINE_WORDS-1:0] wmask;
    logic [MEM_TAG_W-1:0]  tag;    // echoed in the read response
  } mem_req_t;

  typedef struct packed {
    laddr_t                addr;
    line_t                 data;
    logic [MEM_TAG_W-1:0]  tag;
  } mem_rsp_t;


  // L2 line states: the four MESI states plus the transient states the FSM
  // uses so that no action ever waits on the network.
  typedef enum logic [3:0] {
    L2_I, L2_S, L2_E, L2_M,
    L2_IS_D,   // GETS sent, waiting for data
    L2_IM_D,   // GETM sent from I, waiting for data
    L2_SM_D,   // GETM sent from S (upgrade), waiting for data
    L2_MI_A,   // PUTM sent, waiting for PUT_ACK
    L2_SI_A,   // PUTS sent (or downgraded while MI_A), waiting for PUT_ACK
    L2_II_A    // copy given away while a PUT was in flight, waiting for PUT_ACK
  } l2_state_t;

  function automatic logic l2_stable(l2_state_t s);
    return s inside {L2_I, L2_S, L2_E, L2_M};
  endfunction

  function automatic logic l2_waits_data(l2_state_t s);
    return s inside {L2_IS_D, L2_IM_D, L2_SM_D};
  endfunction

  // L3 directory states.
  typedef enum logic [2:0] {
    D_NP,     // way empty
    D_I,      // line in L3, no L2 copy
    D_S,      // shared by the L2s in the sharer list
    D_EM,     // one L2 owns it in E or M
    D_IS_D,   // memory read outstanding for a GETS
    D_IM_D,   // memory read outstanding for a GETM
    D_S_A,    // invalidations sent, waiting for INV_ACKs
    D_EM_D    // FWD_GETS sent to the owner, waiting for its DATA_DIR
  } l3_state_t;

  // Directory metadata of one L3 line (besides its tag). In the transient
  // states owner names the requester being served and acks counts the
  // invalidation acknowledgements still expected.
  typedef struct packed {
    l3_state_t         state;
    logic              dirty;     // L3 copy newer than memory
    node_t             owner;
    logic [NUM_L2-1:0] sharers;
    logic [2:0]        acks;
  } l3_meta_t;

  function automatic logic l3_stable(l3_state_t s);
    return s inside {D_NP, D_I, D_S, D_EM};
  endfunction

  function automatic line_t merge_words(line_t old, line_t nw, logic [LINE_WORDS-1:0] m);
    line_t r;
    for (int w = 0; w < LINE_WORDS; w++)
      r[w*WORD_W +: WORD_W] = m[w] ? nw[w*WORD_W +: WORD_W] : old[w*WORD_W +: WORD_W];
    return r;
  endfunction

endpackage
