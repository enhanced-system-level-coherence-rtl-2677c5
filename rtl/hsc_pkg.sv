// hsc_pkg: types and constants shared by the system-level coherence directory.
//
// The directory serves NUM_COREPAIRS CorePair L2 caches (MOESI) and NUM_TCC GPU
// L2 caches (TCC, VIPER), which together form the NUM_CLIENTS caching agents that
// can be probed, plus one DMA engine that issues requests but caches nothing.
// Source ids: 0..NUM_COREPAIRS-1 are L2s, then the TCCs, then DMA (DMA_ID).
// The counts follow the evaluated system (4 CorePairs, 1 TCC). Line size is 64 B.
// The 48-bit physical address, the atomic operation set and the message
// layouts are this design's own choices.
package hsc_pkg;

  localparam int unsigned NUM_COREPAIRS = 4;
  localparam int unsigned NUM_TCC       = 1;
  localparam int unsigned NUM_CLIENTS   = NUM_COREPAIRS + NUM_TCC;
  localparam int unsigned NUM_SRC       = NUM_CLIENTS + 1;
  localparam int unsigned DMA_ID        = NUM_CLIENTS;
  localparam int unsigned SRC_W         = $clog2(NUM_SRC);
  localparam int unsigned OWN_W         = $clog2(NUM_CLIENTS);

  localparam int unsigned LINE_BYTES = 64;
  localparam int unsigned LINE_W     = 8 * LINE_BYTES;
  localparam int unsigned WORDS      = LINE_BYTES / 4;
  localparam int unsigned PADDR_W    = 48;
  localparam int unsigned OFFSET_W   = $clog2(LINE_BYTES);
  localparam int unsigned LADDR_W    = PADDR_W - OFFSET_W;

  typedef logic [LADDR_W-1:0]     laddr_t;   // line address
  typedef logic [LINE_W-1:0]      line_t;
  typedef logic [LINE_BYTES-1:0]  bmask_t;   // byte enables of a line
  typedef logic [NUM_CLIENTS-1:0] cmask_t;   // one bit per caching agent
  typedef logic [SRC_W-1:0]       src_t;
  typedef logic [OWN_W-1:0]       own_t;

  // Requests the directory accepts.
  typedef enum logic [3:0] {
    REQ_RDBLK    = 4'd0,  // read, shared or exclusive grant
    REQ_RDBLKS   = 4'd1,  // read, shared grant only (instruction miss)
    REQ_RDBLKM   = 4'd2,  // write permission
    REQ_VICDIRTY = 4'd3,  // dirty victim write-back
    REQ_VICCLEAN = 4'd4,  // clean victim write-back
    REQ_WT       = 4'd5,  // GPU write-through (masked)
    REQ_ATOMIC   = 4'd6,  // system-level atomic
    REQ_FLUSH    = 4'd7,  // GPU flush for store-release
    REQ_DMARD    = 4'd8,
    REQ_DMAWR    = 4'd9   // masked DMA write
  } req_type_e;

  // Stable directory states. The transient busy state is the controller itself.
  typedef enum logic [1:0] {
    DIR_I = 2'd0,
    DIR_S = 2'd1,
    DIR_O = 2'd2
  } dir_state_e;

  typedef enum logic [1:0] {
    GRANT_NONE = 2'd0,   // acknowledgement (victims, WT, flush, DMA write) or data only
    GRANT_S    = 2'd1,
    GRANT_E    = 2'd2,
    GRANT_M    = 2'd3
  } grant_e;

  typedef enum logic [1:0] {
    ATOM_ADD  = 2'd0,
    ATOM_SWAP = 2'd1,
    ATOM_CAS  = 2'd2,
    ATOM_MAX  = 2'd3    // unsigned maximum
  } atomic_op_e;

  typedef enum logic {
    PRB_DOWNGRADE = 1'b0,
    PRB_INV       = 1'b1
  } probe_e;

  typedef struct packed {
    req_type_e  typ;
    src_t       src;
    laddr_t     addr;
    line_t      data;      // victim, write-through or DMA write data
    bmask_t     mask;      // byte enables for WT / DMA write
    atomic_op_e aop;
    logic [3:0] word;      // 32-bit word of the line an atomic works on
    logic [31:0] operand;
    logic [31:0] compare;  // CAS compare value
  } req_t;

  typedef struct packed {
    src_t   dst;
    grant_e grant;
    line_t  data;          // line data; for an atomic, the line before the update
  } rsp_t;

  typedef struct packed {
    dir_state_e state;
    own_t       owner;     // valid in DIR_O
    cmask_t     sharers;   // full-map sharer vector (owner kept separately)
  } dir_entry_t;

  typedef struct packed {
    logic   we;
    laddr_t addr;
    line_t  data;
  } mem_req_t;

  function automatic logic is_l2(input src_t s);
    return s < src_t'(NUM_COREPAIRS);
  endfunction

  function automatic cmask_t client_bit(input src_t s);
    return (s < src_t'(NUM_CLIENTS)) ? (cmask_t'(1) << s) : '0;
  endfunction

endpackage
