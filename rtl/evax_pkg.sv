// evax_pkg: sizes, types and the configuration address map shared by the
// perceptron attack detector.
//
// The detector samples 145 binary features, 133 taken from existing
// hardware performance counters (HPCs) and 12 engineered security HPCs,
// each the AND of two base event signals. Every feature has a 2-bit signed
// weight in [-2,1]; a single 9-bit accumulator adds the weights of the
// features that are 1, one per cycle. A detection switches the core to a
// secure mode in which a mitigation (fences or a speculative buffer) is
// enabled for a programmable number of committed instructions.
//
// The feature counts, the weight range, the accumulator width, the commit
// width and the 1M-instruction secure window come from the EVAX
// proposal. Counter width, index width, the address map and the reset
// values are this design's own choices.
package evax_pkg;

  // ---- sizes ---------------------------------------------------------------
  localparam int unsigned N_BASE   = 133;  // existing HPC features
  localparam int unsigned N_SEC    = 12;   // engineered security HPCs
  localparam int unsigned N_FEAT   = N_BASE + N_SEC;  // 145 perceptron inputs
  localparam int unsigned FANIN    = 2;    // base signals ANDed per security HPC
  localparam int unsigned WGT_W    = 2;    // weight in [-2,1]: 2-bit two's complement
  localparam int unsigned ACC_W    = 9;    // 435 distinct dot-product values
  localparam int unsigned THETA_W  = 10;   // signed detection threshold
  localparam int unsigned CNT_W    = 16;   // event counter width
  localparam int unsigned IDX_W    = 8;    // feature index width (145 < 256)
  localparam int unsigned COMMIT_W = 8;    // instructions committed per cycle, max
  localparam int unsigned CCNT_W   = $clog2(COMMIT_W + 1);  // width of a commit count
  localparam int unsigned CFG_AW   = 10;   // configuration address width
  localparam int unsigned CFG_DW   = 32;   // configuration data width

  localparam int unsigned SAMPLE_INSTS_DEF = 10_000;     // sampling interval
  localparam int unsigned SECURE_INSTS_DEF = 1_000_000;  // secure-mode window

  typedef logic signed [WGT_W-1:0]   weight_t;
  typedef logic signed [THETA_W-1:0] theta_t;
  typedef logic [CNT_W-1:0]          count_t;
  typedef logic [IDX_W-1:0]          idx_t;
  typedef logic [CCNT_W-1:0]         ccnt_t;

  // Mitigation chosen for secure mode.
  typedef enum logic [1:0] {
    POL_SPECTRE_FENCE    = 2'd0,  // fence after every branch
    POL_FUTURISTIC_FENCE = 2'd1,  // fence before every load
    POL_SPECTRE_SPEC     = 2'd2,  // speculative buffer, Spectre threat model
    POL_FUTURISTIC_SPEC  = 2'd3   // speculative buffer, futuristic threat model
  } policy_e;

  // Enables handed to the core's mitigation logic.
  typedef struct packed {
    logic fence_after_branch;
    logic fence_before_load;
    logic specbuf_spectre;
    logic specbuf_futuristic;
  } mitig_t;

  // ---- configuration (patch update) address map ----------------------------
  // addr[9:8] selects a region, addr[7:0] an index inside it.
  localparam logic [1:0] REG_WEIGHT = 2'd0;  // index = feature, data[1:0] = weight
  localparam logic [1:0] REG_FTHR   = 2'd1;  // index = feature, data[15:0] = count threshold
  localparam logic [1:0] REG_SEL    = 2'd2;  // index = sec*FANIN + input, data[7:0] = base index
  localparam logic [1:0] REG_CTRL   = 2'd3;  // scalar registers below
  localparam logic [7:0] CTRL_THETA  = 8'h00;  // data[9:0]  detection threshold (signed)
  localparam logic [7:0] CTRL_POLICY = 8'h01;  // data[1:0]  policy_e
  localparam logic [7:0] CTRL_WINDOW = 8'h02;  // data[31:0] secure-mode instructions
  localparam logic [7:0] CTRL_SAMPLE = 8'h03;  // data[31:0] sampling interval, instructions

  // Enables for a policy while in secure mode.
  function automatic mitig_t policy_enables(policy_e p);
    mitig_t m;
    m = '0;
    unique case (p)
      POL_SPECTRE_FENCE:    m.fence_after_branch = 1'b1;
      POL_FUTURISTIC_FENCE: m.fence_before_load  = 1'b1;
      POL_SPECTRE_SPEC:     m.specbuf_spectre    = 1'b1;
      POL_FUTURISTIC_SPEC:  m.specbuf_futuristic = 1'b1;
      default:              m = '0;
    endcase
    return m;
  endfunction

endpackage
