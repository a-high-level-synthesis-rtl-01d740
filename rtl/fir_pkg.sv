// fir_pkg: shared types and constants of the bus-based 4-point FIR data path.
//
// The data path is a finite state machine with a data path (FSMD): a control
// unit (fir_ctrl) walks a fixed 15-step schedule and, in every step, emits
// one control word of type ctrl_t.  The control word says which source drives
// each of the two buses (b1, b2), which functional-unit operand latches and
// which registers load from the buses, and which memory word is read or
// written.  All modules that take part in the schedule share this package.
//
// Sizes that follow the document: 8-bit coefficients and samples, a 16-bit
// result, a 20 ns step, a multiplier of 80 ns (4 steps), an adder of 40 ns
// (2 steps) and a sample period of 300 ns (15 steps).  The packing of the
// control word is this design's own choice.
package fir_pkg;

  // Widths of coefficients/samples and of the buses (= result width).
  localparam int unsigned DATA_W  = 8;
  localparam int unsigned BUS_W   = 16;

  // Filter order: four taps k0..k3 and samples x(n)..x(n-3).
  localparam int unsigned N_TAPS  = 4;
  localparam int unsigned TAP_AW  = $clog2(N_TAPS);

  // Timing in clock steps of 20 ns.
  localparam int unsigned N_STEPS = 15;  // 300 ns sample period
  localparam int unsigned MUL_LAT = 4;   // 80 ns multiplier
  localparam int unsigned ADD_LAT = 2;   // 40 ns adder
  localparam int unsigned STEP_W  = $clog2(N_STEPS + 1);

  typedef logic [STEP_W-1:0] step_t;
  typedef logic [TAP_AW-1:0] tap_t;
  typedef logic [BUS_W-1:0]  word_t;

  // One control word per step.  *_oe enables a tristate driver onto a bus,
  // *_ld loads an operand latch or register from a bus at the end of the step.
  typedef struct packed {
    // sources on bus b1
    logic rom_oe;     // coefficient ROM -> b1   (t1, t3, t5, t11)
    logic m1_oe;      // multiplier m1  -> b1    (t7)
    logic r1_oe;      // register r1    -> b1    (t9)
    logic a_oe;       // adder a        -> b1    (t13, t15)
    // sources on bus b2
    logic ram_oe;     // sample RAM     -> b2    (t2, t4, t6, t12)
    logic m2_oe;      // multiplier m2  -> b2    (t8)
    logic m3_oe;      // multiplier m3  -> b2    (t14)
    logic r2_oe;      // register r2    -> b2    (t10)
    // destinations
    logic m1_ld;      // m1 operand latches <- b1, b2
    logic m2_ld;      // m2 operand latches <- b1, b2
    logic m3_ld;      // m3 operand latches <- b1, b2
    logic a_ld;       // adder operand latches <- b1, b2
    logic r1_ld;      // r1 <- b1
    logic r2_ld;      // r2 <- b2
    logic ram_y_we;   // RAM result word <- b1   (t15)
    logic x_take;     // RAM takes the next input sample at the end of the step
    // memory addresses
    tap_t rom_addr;   // coefficient index i of k_i
    tap_t ram_tap;    // sample age i of x(n-i)
  } ctrl_t;

endpackage
