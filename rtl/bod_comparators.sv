// bod_comparators: behavioural model of the two analog comparators of the
// power-on-reset / brown-out detector, with their resistive dividers and
// bandgap reference folded into two thresholds.
//
// `vbat_mv` is the battery voltage in millivolts. `comp_hi` is 1 above the
// high threshold (1.7 V), `comp_lo` is 1 above the low threshold (1.2 V).
// The real comparators are analog circuits; this model only stands in for
// them so the digital lock-off logic can be exercised. The thresholds are
// the published ones; the high comparator's hysteresis is not modelled.
module bod_comparators #(
  parameter int unsigned VTH_HI_MV = 1700,
  parameter int unsigned VTH_LO_MV = 1200
) (
  input  logic [15:0] vbat_mv,
  output logic        comp_hi,
  output logic        comp_lo
);
  assign comp_hi = 32'(vbat_mv) > VTH_HI_MV;
  assign comp_lo = 32'(vbat_mv) > VTH_LO_MV;
endmodule
