// tls_pkg: types and constants shared by the thread-level-speculation (TLS)
// memory system. Word size follows the one-read-bit-per-32-bit-word rule of the
// speculative L1 cache; the line size, task-ID width and address width are
// choices of this design. A line is LINE_WORDS 32-bit words; addresses are byte
// addresses, with the line address being the upper ADDR_W-LINE_OFF_W bits.
package tls_pkg;

  localparam int unsigned WORD_W      = 32;   // one speculative read bit per 32-bit word
  localparam int unsigned LINE_WORDS  = 4;    // 16-byte lines (design choice)
  localparam int unsigned LINE_BYTES  = LINE_WORDS * 4;
  localparam int unsigned LINE_W      = LINE_WORDS * WORD_W;
  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned WOFF_W      = $clog2(LINE_WORDS);
  localparam int unsigned LOFF_W      = WOFF_W + 2;          // byte offset bits within a line
  localparam int unsigned LADDR_W     = ADDR_W - LOFF_W;      // line address width
  localparam int unsigned TASK_W      = 16;
  localparam int unsigned CPUID_W     = 4;    // room for up to 16 processors

  typedef logic [ADDR_W-1:0]       addr_t;
  typedef logic [LADDR_W-1:0]      laddr_t;
  typedef logic [WORD_W-1:0]       word_t;
  typedef logic [LINE_W-1:0]       line_t;
  typedef logic [LINE_BYTES-1:0]   lmask_t;
  typedef logic [TASK_W-1:0]       task_t;
  typedef logic [CPUID_W-1:0]      cpuid_t;

  // Speculation primitives of the abstract machine (Table 2.1 of the model).
  typedef enum logic [2:0] {
    OP_NONE       = 3'd0,
    OP_START      = 3'd1,   // Start_Speculation(n)
    OP_COMMIT     = 3'd2,   // Commit
    OP_COMMIT_ADV = 3'd3,   // Commit_and_Advance
    OP_TERMINATE  = 3'd4    // Terminate_Speculation
  } spec_op_e;

  // One store waiting in a processor's store FIFO.
  typedef struct packed {
    addr_t          addr;
    word_t          data;
    logic [3:0]     be;
    logic           sync;   // synch_write: never raises a RAW hazard
  } store_t;

  // One write-bus transaction, broadcast to every L1 and to the buffer pool.
  typedef struct packed {
    logic           valid;
    cpuid_t         cpu;
    addr_t          addr;
    word_t          data;
    logic [3:0]     be;
    logic           sync;
    logic           has_task;   // writer is a speculative task (else sequential / kernel write)
    task_t          task_id;    // writer's task ID when has_task
  } wbus_t;

  function automatic laddr_t line_of(addr_t a);
    return a[ADDR_W-1:LOFF_W];
  endfunction

  function automatic logic [WOFF_W-1:0] word_of(addr_t a);
    return a[LOFF_W-1:2];
  endfunction

endpackage
