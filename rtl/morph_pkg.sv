// morph_pkg: types and constants shared by the morphable many-core accelerator.
//
// Stream words are 32 bits; the top 8 bits of every word carry the tuple
// (cluster_id, core_id), 4 bits each, which also makes the 4-bit TDEST of the
// 16-port interconnect. Clusters take one of four configurations: a blank box
// or a homogeneous cluster of Type A (15 cores), Type B (12) or Type C (8)
// processing elements. The configuration codes, the PE-side signal set and
// the shared-bus request/response structs are choices of this design.
package morph_pkg;

  localparam int unsigned DATA_W     = 32;
  localparam int unsigned ID_W       = 4;            // cluster_id and core_id
  localparam int unsigned TDEST_W    = 4;
  localparam int unsigned PAYLOAD_W  = DATA_W - 2*ID_W;  // 24
  localparam int unsigned CLUSTER_LSB = 28;          // word[31:28] = cluster_id
  localparam int unsigned CORE_LSB    = 24;          // word[27:24] = core_id
  localparam int unsigned N_EVENTS   = 4;            // MUL, FP, SW_MUL, SW_FP

  typedef enum logic [1:0] {
    CFG_BLANK  = 2'd0,
    CFG_TYPE_A = 2'd1,   // MB-LITE, no barrel shifter, no multiplier
    CFG_TYPE_B = 2'd2,   // full MB-LITE
    CFG_TYPE_C = 2'd3    // full MB-LITE with single-precision FPU
  } cluster_cfg_e;

  // Event pulse positions in pe_to_core_t.ev
  localparam int unsigned EV_MUL    = 0;
  localparam int unsigned EV_FP     = 1;
  localparam int unsigned EV_SW_MUL = 2;
  localparam int unsigned EV_SW_FP  = 3;

  // Number of live cores of a cluster in each configuration (Table 2 sizes)
  function automatic int unsigned cores_for_cfg(cluster_cfg_e cfg);
    case (cfg)
      CFG_TYPE_A: return 15;
      CFG_TYPE_B: return 12;
      CFG_TYPE_C: return 8;
      default:    return 0;
    endcase
  endfunction

  // Core controller -> processing element
  typedef struct packed {
    logic                 pe_rst;    // PE held in reset (idle)
    logic [PAYLOAD_W-1:0] cfg_word;  // kernel parameterisation from the host
    cluster_cfg_e         pe_type;   // architecture the region currently holds
  } core_to_pe_t;

  // Processing element -> core controller
  typedef struct packed {
    logic                 cfg_read;  // PE has read the configuration word
    logic                 done;      // kernel finished
    logic [PAYLOAD_W-1:0] ret_msg;   // return message, valid with done
    logic [N_EVENTS-1:0]  ev;        // one-cycle event pulses
  } pe_to_core_t;

  // Shared-bus / memory request (TADDR bus) and response
  typedef struct packed {
    logic              req;
    logic              we;
    logic [31:0]       addr;   // word address
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

  // (the acceptance signal 'gnt' travels beside this struct, not in it)
  typedef struct packed {
    logic              rvalid;  // read data / write acknowledge
    logic [DATA_W-1:0] rdata;
  } mem_rsp_t;

endpackage
