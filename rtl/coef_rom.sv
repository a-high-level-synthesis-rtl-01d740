// coef_rom: read-only store of the filter coefficients k0..k3.
//
// The ROM drives bus b1 (through its tristate buffer, enabled by the control
// unit) during the four steps that load a multiplier: k0, k1, k2 in steps
// 1..3 and k3 in step 8.  The read is asynchronous: addr selects k_addr
// within the same step, and the DATA_W-bit coefficient is zero-extended to
// the bus width.  The contents are the parameter COEF, whose element i is
// k_i.  Its default 0,1,2,3 is the coefficient set of the document's
// simulation of the filter; the document gives no other set.
module coef_rom
  import fir_pkg::*;
#(
  parameter logic [N_TAPS-1:0][DATA_W-1:0] COEF = {8'd3, 8'd2, 8'd1, 8'd0}
) (
  input  tap_t  addr,
  output word_t data
);

  assign data = word_t'(COEF[addr]);

endmodule
