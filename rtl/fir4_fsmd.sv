// fir4_fsmd: bus-based 4-point FIR filter, y(n) = k0 x(n) + k1 x(n-1) +
// k2 x(n-2) + k3 x(n-3), built as a finite state machine with a data path.
//
// Data path (allocation and binding as in the document's synthesized FIR):
//   * two buses b1, b2 (bus_line), each source on a bus through one
//     tristate buffer - 8 buffers in all:
//       b1 <- coefficient ROM, multiplier m1, register r1, adder a
//       b2 <- sample RAM, multiplier m2, multiplier m3, register r2
//   * three multipliers m1..m3 (fu_mult) and one adder a (fu_add), operand
//     a of every unit from b1, operand b from b2;
//   * two registers: r1 loads from b1, r2 from b2 (bus_reg);
//   * coefficient ROM (coef_rom) and sample/result RAM (sample_ram); the RAM
//     result word loads from b1.
//   That is 11 multiplexer inputs, all single-input (6 on b1, 5 on b2).
//   m1 computes k0 x(n), m2 computes k1 x(n-1) and later k3 x(n-3), m3
//   computes k2 x(n-2).  r1 holds the running sum (v1, v3, v5), r2 the next
//   product (v2, v4, v6), and the adder performs the three additions in turn.
// Control: fir_ctrl steps through a 15-step schedule (see its header).
//
// Interface and timing (one clock = one 20 ns control step):
//   x_take is high in the last step of each period; x_in is captured at the
//   clock edge ending that step and becomes x(n) of the next period.
//   y_valid pulses for one clock in the first step of each period; y_out then
//   holds the result of the period just finished and keeps it for the whole
//   next period.  A sample taken at the end of period p therefore appears on
//   y_out one period (15 clocks) later.  After reset the history is all zero.
//   Arithmetic is unsigned; products are 16 bits and sums wrap modulo 2^16.
//   The document clocks the data path with two phases; this design uses one
//   edge-triggered clock.
module fir4_fsmd
  import fir_pkg::*;
#(
  parameter logic [N_TAPS-1:0][DATA_W-1:0] COEF = {8'd3, 8'd2, 8'd1, 8'd0}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] x_in,
  output logic              x_take,
  output word_t             y_out,
  output logic              y_valid,
  output step_t             step
);

  ctrl_t ctrl;
  word_t b1, b2;
  word_t rom_q, ram_q, m1_y, m2_y, m3_y, a_y, r1_q, r2_q;
  logic  m1_rdy, m2_rdy, m3_rdy, a_rdy;

  // ---------------- control unit ----------------
  fir_ctrl u_ctrl (
    .clk, .rst_n, .step, .ctrl
  );

  // ---------------- interconnect: buses ----------------
  bus_line #(.N_DRV(4), .W(BUS_W)) u_b1 (
    .clk, .rst_n,
    .drv_en   ({ctrl.a_oe, ctrl.r1_oe, ctrl.m1_oe, ctrl.rom_oe}),
    .drv_data ({a_y,       r1_q,       m1_y,       rom_q}),
    .bus      (b1)
  );

  bus_line #(.N_DRV(4), .W(BUS_W)) u_b2 (
    .clk, .rst_n,
    .drv_en   ({ctrl.r2_oe, ctrl.m3_oe, ctrl.m2_oe, ctrl.ram_oe}),
    .drv_data ({r2_q,       m3_y,       m2_y,       ram_q}),
    .bus      (b2)
  );

  // ---------------- memories ----------------
  coef_rom #(.COEF(COEF)) u_rom (
    .addr (ctrl.rom_addr),
    .data (rom_q)
  );

  sample_ram u_ram (
    .clk, .rst_n,
    .x_take  (ctrl.x_take),
    .x_in    (x_in),
    .tap     (ctrl.ram_tap),
    .rdata   (ram_q),
    .y_we    (ctrl.ram_y_we),
    .y_wdata (b1),
    .y_q     (y_out)
  );

  // ---------------- functional units ----------------
  fu_mult #(.IN_W(DATA_W), .LAT(MUL_LAT)) u_m1 (
    .clk, .rst_n, .ld(ctrl.m1_ld), .a_op(b1[DATA_W-1:0]), .b_op(b2[DATA_W-1:0]),
    .oe(ctrl.m1_oe), .y(m1_y), .ready(m1_rdy)
  );

  fu_mult #(.IN_W(DATA_W), .LAT(MUL_LAT)) u_m2 (
    .clk, .rst_n, .ld(ctrl.m2_ld), .a_op(b1[DATA_W-1:0]), .b_op(b2[DATA_W-1:0]),
    .oe(ctrl.m2_oe), .y(m2_y), .ready(m2_rdy)
  );

  fu_mult #(.IN_W(DATA_W), .LAT(MUL_LAT)) u_m3 (
    .clk, .rst_n, .ld(ctrl.m3_ld), .a_op(b1[DATA_W-1:0]), .b_op(b2[DATA_W-1:0]),
    .oe(ctrl.m3_oe), .y(m3_y), .ready(m3_rdy)
  );

  fu_add #(.W(BUS_W), .LAT(ADD_LAT)) u_a (
    .clk, .rst_n, .ld(ctrl.a_ld), .a_bus(b1), .b_bus(b2),
    .oe(ctrl.a_oe), .y(a_y), .ready(a_rdy)
  );

  // ---------------- storage: intermediate registers ----------------
  bus_reg #(.W(BUS_W)) u_r1 (
    .clk, .rst_n, .ld(ctrl.r1_ld), .d(b1), .q(r1_q)
  );

  bus_reg #(.W(BUS_W)) u_r2 (
    .clk, .rst_n, .ld(ctrl.r2_ld), .d(b2), .q(r2_q)
  );

  // ---------------- outputs ----------------
  assign x_take = ctrl.x_take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= ctrl.ram_y_we;
  end

  // A unit is reloaded only after its latency has passed, so a result it
  // still owes is never lost (m2 serves two operations per period).
  a_reload_m1: assert property (@(posedge clk) disable iff (!rst_n) ctrl.m1_ld |-> m1_rdy);
  a_reload_m2: assert property (@(posedge clk) disable iff (!rst_n) ctrl.m2_ld |-> m2_rdy);
  a_reload_m3: assert property (@(posedge clk) disable iff (!rst_n) ctrl.m3_ld |-> m3_rdy);
  a_reload_a:  assert property (@(posedge clk) disable iff (!rst_n) ctrl.a_ld  |-> a_rdy);

endmodule
