// tester_pkg: types shared by the LUT-based scan tester.
//
// The tester replays stored scan patterns into many short scan chains in
// parallel. Its sequencer (se_gen) produces one control word per clock
// cycle; the word travels down a two-stage pipeline alongside the pattern
// data so that scan enable, scan data and MISR compaction reach the die in
// the same cycle. This package holds the sequencer states and that control
// word. The phase names are this design's own; the document only names the
// scan enable and die reset outputs.
package tester_pkg;

  // Sequencer phases.
  typedef enum logic [2:0] {
    PH_ASIC_RST = 3'd0,  // die under test held in reset
    PH_SHIFT    = 3'd1,  // shift one pattern in (and previous response out)
    PH_CAPTURE  = 3'd2,  // scan enable low for one capture clock
    PH_UNLOAD   = 3'd3,  // final shift that only unloads the last response
    PH_CHECK    = 3'd4,  // compare signature with the golden one
    PH_DONE     = 3'd5   // test finished, result held
  } phase_e;

  // Control word for one clock cycle at the die interface.
  typedef struct packed {
    logic asic_rst;  // reset to the die under test
    logic se;        // scan enable (1 = shift, 0 = capture / idle)
    logic load;      // scan register takes a new pattern bit
    logic compact;   // MISR absorbs the scan-out bits of this shift
    logic check;     // last cycle: signature is complete after this edge
  } scan_ctl_t;

  localparam scan_ctl_t CTL_IDLE = '{asic_rst: 1'b0, se: 1'b0, load: 1'b0,
                                     compact: 1'b0, check: 1'b0};

endpackage
