// se_gen: scan enable signal generator and test sequencer.
//
// Drives the whole test from reset to verdict, producing one control word
// (tester_pkg::scan_ctl_t) per clock together with the advance signals of
// the LUT address generator (bit counter) and the RAM address generator
// (segment and pattern counter). A chain is N_SEGS LUT-sized segments long;
// the RAM address advances at the end of every segment so that each segment
// gets its own select values:
//
//   PH_ASIC_RST  ASIC_RST_CYCLES clocks with the die reset asserted.
//   PH_SHIFT     N_SEGS*LUT_DEPTH clocks, scan enable high: one pattern is
//                shifted in while the previous response (if any) is shifted
//                out and compacted. Ends at the last bit of the last segment.
//   PH_CAPTURE   one clock with scan enable low: the die captures its
//                response. The RAM address moves to the next pattern (after
//                the last pattern it wraps to 0) and, after the last
//                pattern, the sequencer goes to PH_UNLOAD.
//   PH_UNLOAD    N_SEGS*LUT_DEPTH clocks, scan enable high, no new pattern:
//                the last response is compacted.
//   PH_CHECK     one clock asking for the signature comparison.
//   PH_DONE      idle until reset.
//
// Test length after the die reset, with chain length C = N_SEGS*LUT_DEPTH:
// N_PATTERNS*(C+1) + C clocks, plus one for the check. The document names this block and its
// scan enable and die reset outputs; the phase sequence above, with shift
// and unload overlapped, is this design's choice.
module se_gen
  import tester_pkg::*;
#(
  parameter int unsigned ASIC_RST_CYCLES = 2
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      lut_last_i,  // bit counter is at the last bit
  input  logic      seg_last_i,  // RAM address is at the last segment
  input  logic      pat_last_i,  // RAM address is at the last pattern
  output scan_ctl_t ctl_o,       // control word for this clock
  output logic      lut_en_o,    // advance bit counter
  output logic      ram_en_o,    // advance RAM address
  output phase_e    phase_o
);

  localparam int unsigned RW = (ASIC_RST_CYCLES > 1) ? $clog2(ASIC_RST_CYCLES) : 1;

  phase_e        phase;
  logic [RW-1:0] rst_cnt;
  logic          have_resp;  // a captured response is waiting in the chains

  assign phase_o = phase;

  always_comb begin
    ctl_o    = CTL_IDLE;
    lut_en_o = 1'b0;
    ram_en_o = 1'b0;
    unique case (phase)
      PH_ASIC_RST: ctl_o.asic_rst = 1'b1;
      PH_SHIFT: begin
        ctl_o.se      = 1'b1;
        ctl_o.load    = 1'b1;
        ctl_o.compact = have_resp;
        lut_en_o      = 1'b1;
        ram_en_o      = lut_last_i && !seg_last_i;
      end
      PH_CAPTURE: ram_en_o = 1'b1;
      PH_UNLOAD: begin
        ctl_o.se      = 1'b1;
        ctl_o.compact = 1'b1;
        lut_en_o      = 1'b1;
        ram_en_o      = lut_last_i && !seg_last_i;
      end
      PH_CHECK: ctl_o.check = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= PH_ASIC_RST;
      rst_cnt   <= '0;
      have_resp <= 1'b0;
    end else begin
      unique case (phase)
        PH_ASIC_RST: begin
          rst_cnt <= rst_cnt + 1'b1;
          if (32'(rst_cnt) == ASIC_RST_CYCLES - 1) phase <= PH_SHIFT;
        end
        PH_SHIFT:   if (lut_last_i && seg_last_i) phase <= PH_CAPTURE;
        PH_CAPTURE: begin
          have_resp <= 1'b1;
          phase     <= pat_last_i ? PH_UNLOAD : PH_SHIFT;
        end
        PH_UNLOAD:  if (lut_last_i && seg_last_i) phase <= PH_CHECK;
        PH_CHECK:   phase <= PH_DONE;
        default:    phase <= PH_DONE;
      endcase
    end
  end

  // Scan enable and die reset are never active together.
  a_rst_no_shift: assert property (@(posedge clk) disable iff (rst)
                                   !(ctl_o.asic_rst && ctl_o.se));
  // A capture always follows a complete pattern.
  a_capture_after_last_bit: assert property (@(posedge clk) disable iff (rst)
                                   (phase == PH_SHIFT && lut_last_i && seg_last_i) |=> phase == PH_CAPTURE);

endmodule
