// fu_mult: multiplier functional unit of the bus-based data path (m1, m2, m3).
//
// As in the generic functional unit of the data-path style, the unit has one
// operand latch per input, each fed from a bus through an input multiplexer
// (a single-input multiplexer, i.e. a wire, in the bound FIR data path), a
// combinational multiplier behind the latches, and a tristate buffer from the
// product onto a bus.  ld captures both operands at the end of the load step.
// The latches then hold the operands, so the product stays valid for as long
// as the unit is not reloaded: the multiplier is a multicycle path, not a
// pipeline, and one unit can serve several operations at different times.
//
// The product of two IN_W-bit unsigned operands is 2*IN_W bits wide and fits
// the bus exactly.  The operands are the low IN_W bits of their buses; the
// upper bus bits are not wired to the unit.
//
// Timing: the document's multiplier takes 80 ns, i.e. LAT = 4 steps of
// 20 ns.  Loaded at the end of step s, the product may be put on the bus in
// step s+LAT or later.  A step counter since the last load drives the ready
// output, and an assertion flags a read (oe) before ready.  Reset clears the
// latches and starts the unit ready; that is this design's own choice.
module fu_mult #(
  parameter int unsigned IN_W = 8,
  parameter int unsigned LAT  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld,     // load both operand latches
  input  logic [IN_W-1:0]   a_op,   // low IN_W bits of the bus feeding operand a
  input  logic [IN_W-1:0]   b_op,   // low IN_W bits of the bus feeding operand b
  input  logic              oe,     // product is being driven onto a bus
  output logic [2*IN_W-1:0] y,      // product to the tristate buffer
  output logic              ready   // LAT steps have passed since the load
);

  localparam int unsigned CW = $clog2(LAT + 1);

  logic [IN_W-1:0] a_q, b_q;
  logic [CW-1:0]   age;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      age <= CW'(LAT);
    end else if (ld) begin
      a_q <= a_op;
      b_q <= b_op;
      age <= CW'(1);
    end else if (age != CW'(LAT)) begin
      age <= age + CW'(1);
    end
  end

  assign y     = a_q * b_q;
  assign ready = (age == CW'(LAT));

  a_read_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                      oe |-> ready)
    else $error("fu_mult: product read %0d step(s) after load, needs %0d", age, LAT);

endmodule
