// fu_add: adder functional unit of the bus-based data path (unit a).
//
// Same structure as the multiplier unit: two operand latches loaded from the
// buses through (single-input) multiplexers, a combinational W-bit adder
// behind them and a tristate buffer from the sum onto a bus.  The sum wraps
// modulo 2^W (unsigned); the document gives the 16-bit result width but no
// overflow rule, so wrap-around is this design's choice.
//
// Timing: the document's adder takes 40 ns, i.e. LAT = 2 steps of 20 ns.
// Loaded at the end of step s, the sum may be put on the bus in step s+LAT or
// later; it stays valid until the next load.  ready reports that LAT steps
// have passed and an assertion flags an earlier read (oe).
module fu_add #(
  parameter int unsigned W   = 16,
  parameter int unsigned LAT = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] a_bus,
  input  logic [W-1:0] b_bus,
  input  logic         oe,
  output logic [W-1:0] y,
  output logic         ready
);

  localparam int unsigned CW = $clog2(LAT + 1);

  logic [W-1:0]  a_q, b_q;
  logic [CW-1:0] age;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      age <= CW'(LAT);
    end else if (ld) begin
      a_q <= a_bus;
      b_q <= b_bus;
      age <= CW'(1);
    end else if (age != CW'(LAT)) begin
      age <= age + CW'(1);
    end
  end

  assign y     = a_q + b_q;
  assign ready = (age == CW'(LAT));

  a_read_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                      oe |-> ready)
    else $error("fu_add: sum read %0d step(s) after load, needs %0d", age, LAT);

endmodule
