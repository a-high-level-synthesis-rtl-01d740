// bus_reg: intermediate (storage) register of the bus-based data path.
//
// The register takes its input from one bus through its input multiplexer
// and puts its content back on a bus through its own tristate buffer.  In
// the bound data path every register input multiplexer has a single input,
// so the multiplexer reduces to a wire and the bus is wired straight to d.
// ld loads d at the rising clock edge that ends the step; q holds the value
// until the next load and is offered to the bus driver, which the control
// unit enables with its own *_oe bit.  Reset clears the register (the
// document does not discuss reset).
//
// Timing: a value loaded at the end of step s can be driven on a bus from
// step s+1 on.  Reading and loading in the same step is allowed: the bus
// sees the old value, the new one is stored at the edge.
module bus_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end

endmodule
