// soda_pkg: types and constants shared by the SODA hardware task platform.
//
// A task is the unit of work the host hands to the hardware. It names one
// function (which kind of accelerator must run it), up to NUM_SRC source
// variables it reads, one destination variable it writes and a 32-bit
// argument word. Variables are the architectural names the program uses for
// data buffers; the scheduler renames each destination to a fresh physical
// tag so that only true read-after-write dependences make a task wait.
//
// The CSPF (constrained shortest path first) accelerator reads its query from
// the argument word: source node, destination node, the minimum bandwidth a
// link must offer to be usable, and the number of nodes of the graph less one.
//
// All widths here are this design's own choices; the source description gives
// none of them.
package soda_pkg;

  // ---- task descriptors ------------------------------------------------
  localparam int unsigned TASK_ID_W = 8;   // host-visible task number
  localparam int unsigned FUNC_W    = 2;   // accelerator kind
  localparam int unsigned NUM_SRC   = 2;   // source operands per task
  localparam int unsigned NUM_ARCH  = 16;  // architectural variables
  localparam int unsigned VAR_W     = $clog2(NUM_ARCH);
  localparam int unsigned NUM_PHYS  = 32;  // physical buffer tags
  localparam int unsigned TAG_W     = $clog2(NUM_PHYS);
  localparam int unsigned ROB_DEPTH = 16;  // tasks in flight
  localparam int unsigned ROB_W     = $clog2(ROB_DEPTH);
  localparam int unsigned ARG_W     = 32;

  // Function codes: the two CSPF accelerator sizes of the platform.
  localparam logic [FUNC_W-1:0] FUNC_CSPF64  = 2'd0;
  localparam logic [FUNC_W-1:0] FUNC_CSPF128 = 2'd1;

  typedef logic [TASK_ID_W-1:0] task_id_t;
  typedef logic [FUNC_W-1:0]    func_t;
  typedef logic [VAR_W-1:0]     var_t;
  typedef logic [TAG_W-1:0]     tag_t;
  typedef logic [ROB_W-1:0]     rob_idx_t;

  // Task as the host issues it (architectural names).
  typedef struct packed {
    task_id_t                 id;
    func_t                    func;
    logic [NUM_SRC-1:0]       src_used;
    var_t [NUM_SRC-1:0]       src;
    logic                     dst_used;
    var_t                     dst;
    logic [ARG_W-1:0]         arg;
  } task_t;

  // Task as the scheduler dispatches it (physical tags).
  typedef struct packed {
    task_id_t                 id;
    rob_idx_t                 rob;
    func_t                    func;
    logic [NUM_SRC-1:0]       src_used;
    tag_t [NUM_SRC-1:0]       src_tag;
    logic                     dst_used;
    tag_t                     dst_tag;
    logic [ARG_W-1:0]         arg;
  } disp_t;

  // ---- CSPF ----------------------------------------------------------------
  localparam int unsigned NODE_W = 8;   // node number field (up to 256 nodes)
  localparam int unsigned COST_W = 8;   // cost of one link
  localparam int unsigned BW_W   = 8;   // available bandwidth of one link
  localparam int unsigned DIST_W = 16;  // path cost

  typedef logic [NODE_W-1:0] node_t;

  // One directed link of the graph memory.
  typedef struct packed {
    logic              valid;
    logic [COST_W-1:0] cost;
    logic [BW_W-1:0]   bw;
  } link_t;

  // Query carried in the task argument word.
  typedef struct packed {
    node_t           last;    // number of nodes in the graph less one
    logic [BW_W-1:0] min_bw;  // bandwidth constraint
    node_t           dst;
    node_t           src;
  } cspf_query_t;

  typedef struct packed {
    logic              err;        // query out of range for this accelerator
    logic              reachable;  // a path meeting the constraint exists
    logic [DIST_W-1:0] cost;       // cost of the shortest such path
    node_t             hops;       // number of links on it
    node_t             next_hop;   // first node after src on it (dst if src==dst)
  } cspf_result_t;

  // Result record returned to the host for each finished task.
  typedef struct packed {
    task_id_t     id;
    tag_t         dst_tag;
    cspf_result_t res;
  } result_t;

endpackage
