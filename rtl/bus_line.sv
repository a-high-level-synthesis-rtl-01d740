// bus_line: one bus of the linear (bus-based) data path with its tristate
// drivers.
//
// Every source that may place a value on the bus (a memory, a functional unit
// or a register) owns one tristate buffer, enabled by drv_en[i].  The document
// draws real tristate buffers; here each buffer is an AND gate on the source
// value and the bus is the OR of all gated values, which is what a tristate
// bus computes whenever at most one buffer is on.  With no buffer on the bus
// reads 0 (a tristate bus would float).  The control unit must never enable
// two buffers in the same step; an assertion checks this at every clock edge
// (clk and rst_n are used only by that check).
//
// Timing: purely combinational from drv_data/drv_en to bus; a transfer is
// completed by the destination loading the bus at the end of the step.
module bus_line #(
  parameter int unsigned N_DRV = 4,   // tristate buffers on this bus
  parameter int unsigned W     = 16   // bus width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_DRV-1:0]      drv_en,
  input  logic [N_DRV-1:0][W-1:0] drv_data,
  output logic [W-1:0]          bus
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < N_DRV; i++) begin
      bus |= drv_data[i] & {W{drv_en[i]}};
    end
  end

  // Bus contention: two enabled tristate buffers would short the bus.
  a_no_contention: assert property (@(posedge clk) disable iff (!rst_n)
                                    $onehot0(drv_en))
    else $error("bus_line: %0d drivers enabled at once", $countones(drv_en));

endmodule
