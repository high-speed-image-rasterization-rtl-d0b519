// halftone_alu: conditions the incoming 16-bit halftone pattern before it is
// distributed along the scan line.
//
// Four operations, chosen by the mode lines {C1,C2} while the chip is in
// rasterization mode: use the pattern as is (00), invert it (01), replace it
// by all 0s (10) or by all 1s (11).  Several bit planes fed with the same
// pattern but different modes can then paint a mixture of two grey levels
// (multi-value halftoning).  Combinational.
module halftone_alu
  import raster_pkg::*;
#(
  parameter int HT_W = 16
) (
  input  logic [HT_W-1:0] pattern_in,
  input  ht_mode_e        mode,
  output logic [HT_W-1:0] pattern_out
);

  always_comb begin
    unique case (mode)
      HT_ASIS:   pattern_out = pattern_in;
      HT_INVERT: pattern_out = ~pattern_in;
      HT_ZEROS:  pattern_out = '0;
      HT_ONES:   pattern_out = '1;
      default:   pattern_out = pattern_in;
    endcase
  end

endmodule
