// thin_pkg - types and constants shared by the pixel-array thinning circuit.
//
// ctl_t is the control word that a single sequencer broadcasts to every
// pixel of the array. One clock cycle is one "time unit"; a sub-iteration is
// TU_PER_SUB time units:
//   unit 0 : preset_o (plus load_m in the very first unit of a run)
//   unit 1..6 : s[1]..s[6], the one-hot switch selects of the switch unit
//   unit 7 : end_sub1 (first sub-iteration) or end_sub2 (second)
// The link index (dir_e) names the four bidirectional neighbour connections
// N, E, S, W of every pixel. Signal names follow the timing chart of the
// circuit; the packed-struct layout and the link numbering are this design's
// own choice.
package thin_pkg;

  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  typedef struct packed {
    logic       load_m;    // load latch m with the acquired pixel bit
    logic       preset_o;  // preset every latch except m to 1
    logic [6:1] s;         // switch-unit selects, one-hot, one per time unit
    logic       end_sub1;  // reset enable of m, condition with Fc1
    logic       end_sub2;  // reset enable of m, condition with Fc2
  } ctl_t;

  localparam ctl_t CTL_IDLE = '{default: '0};

  localparam int unsigned TU_PER_SUB = 8;  // time units per sub-iteration

endpackage
