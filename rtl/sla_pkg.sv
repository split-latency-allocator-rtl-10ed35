// sla_pkg: types and constants shared by the Split Latency Allocator blocks.
//
// The allocator categorizes wavefronts by the speed of the register entries
// they read (port-speed bits, one per vector register entry), measures each
// compute unit's maximum frequency relative to the slowest one, and maps fast
// wavefronts to CUs whose frequency ratio exceeds 1 + (fraction of slow
// entries) and critical wavefronts to the slower CUs.
//
// Frequency ratios and percentages are fixed point in hundredths: a ratio of
// 1.20 is stored as 120, twenty percent as 20. The field widths below are this
// design's choices; the issue-queue entry layout (opcode, RFA, PS bits, RFB)
// follows the architecture, with the owning wavefront id added.
package sla_pkg;

  // Register entry address: {SIMD number, VGPR index}. Four SIMD units per CU
  // with 256 vector registers each.
  localparam int SIMD_W   = 2;
  localparam int VGPR_W   = 8;
  localparam int REG_W    = SIMD_W + VGPR_W;

  localparam int OPCODE_W = 8;   // instruction opcode field
  localparam int WF_W     = 8;   // wavefront id
  localparam int PCT_W    = 7;   // 0..100 percent
  localparam int RATIO_W  = 10;  // Fmax ratio in hundredths, 0..10.23
  localparam int FMAX_W   = 16;  // per-SIMD maximum frequency code (MHz)

  localparam int unsigned ONE_X100 = 100;

  typedef logic [REG_W-1:0]    reg_addr_t;
  typedef logic [OPCODE_W-1:0] opcode_t;
  typedef logic [WF_W-1:0]     wf_id_t;
  typedef logic [PCT_W-1:0]    pct_t;
  typedef logic [RATIO_W-1:0]  ratio_t;
  typedef logic [FMAX_W-1:0]   fmax_t;

  // Port-speed bit values.
  typedef enum logic {PS_FAST = 1'b0, PS_SLOW = 1'b1} ps_t;

  // Wavefront class produced by the categorizer.
  typedef enum logic {WF_FAST = 1'b0, WF_CRITICAL = 1'b1} wf_class_t;

  // One issue-queue entry: op_code | RFA | PS bits | RFB, tagged with the
  // wavefront that issued it. ps[1] belongs to RFA, ps[0] to RFB.
  typedef struct packed {
    wf_id_t    wf;
    opcode_t   op_code;
    reg_addr_t rfa;
    logic [1:0] ps;
    reg_addr_t rfb;
  } iq_entry_t;

endpackage
