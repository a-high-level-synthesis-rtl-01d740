// fir_ctrl: control unit (the FSM of the FSMD) of the 4-point FIR data path.
//
// The state is the control step 1..N_STEPS of the current sample period.  It
// advances every clock and wraps from 15 to 1, so a new sample is taken and a
// new result stored every 15 steps (300 ns at the document's 20 ns step).
// The control word is a combinational decode of the step (a Moore machine).
//
// The schedule below is this design's own: the document gives the
// allocation (3 multipliers, 1 adder, 2 registers, 2 buses), the binding of
// the transfers t1..t15 to units and buses, the unit delays and the 15-step
// period, but not the step of each transfer.  It was chosen so that the
// transfers occur in the order of their numbers, every unit is read no
// earlier than its latency allows, each bus carries one transfer per step,
// and the result is stored in the last step:
//
//   step  bus b1                      bus b2                      loads
//     1   t1  k0  rom->m1             t2  x(n)   ram->m1          m1
//     2   t3  k1  rom->m2             t4  x(n-1) ram->m2          m2
//     3   t5  k2  rom->m3             t6  x(n-2) ram->m3          m3
//     4   -                           -
//     5   t7  v1  m1->r1              -                           r1
//     6   -                           t8  v2  m2->r2              r2
//     7   t9  r1->a                   t10 r2->a                   a (+1)
//     8   t11 k3  rom->m2             t12 x(n-3) ram->m2          m2
//     9   t13 v3  a->r1               t14 v4  m3->r2              r1, r2
//    10   t9  r1->a                   t10 r2->a                   a (+2)
//    11   -                           -
//    12   t13 v5  a->r1               t8  v6  m2->r2              r1, r2
//    13   t9  r1->a                   t10 r2->a                   a (+3)
//    14   -                           -
//    15   t15 Y   a->ram              -                           ram, x_take
//
// x_take in step 15 tells the sample RAM to take the next input sample at
// the end of the period.  Reset starts the machine in step 1.
module fir_ctrl
  import fir_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  output step_t step,
  output ctrl_t ctrl
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       step <= step_t'(1);
    else if (step == step_t'(N_STEPS)) step <= step_t'(1);
    else                              step <= step + step_t'(1);
  end

  always_comb begin
    ctrl = '0;
    unique case (step)
      step_t'(1): begin  // t1, t2
        ctrl.rom_oe = 1'b1; ctrl.rom_addr = tap_t'(0);
        ctrl.ram_oe = 1'b1; ctrl.ram_tap  = tap_t'(0);
        ctrl.m1_ld  = 1'b1;
      end
      step_t'(2): begin  // t3, t4
        ctrl.rom_oe = 1'b1; ctrl.rom_addr = tap_t'(1);
        ctrl.ram_oe = 1'b1; ctrl.ram_tap  = tap_t'(1);
        ctrl.m2_ld  = 1'b1;
      end
      step_t'(3): begin  // t5, t6
        ctrl.rom_oe = 1'b1; ctrl.rom_addr = tap_t'(2);
        ctrl.ram_oe = 1'b1; ctrl.ram_tap  = tap_t'(2);
        ctrl.m3_ld  = 1'b1;
      end
      step_t'(5): begin  // t7
        ctrl.m1_oe = 1'b1; ctrl.r1_ld = 1'b1;
      end
      step_t'(6): begin  // t8
        ctrl.m2_oe = 1'b1; ctrl.r2_ld = 1'b1;
      end
      step_t'(7), step_t'(10), step_t'(13): begin  // t9, t10
        ctrl.r1_oe = 1'b1; ctrl.r2_oe = 1'b1; ctrl.a_ld = 1'b1;
      end
      step_t'(8): begin  // t11, t12
        ctrl.rom_oe = 1'b1; ctrl.rom_addr = tap_t'(3);
        ctrl.ram_oe = 1'b1; ctrl.ram_tap  = tap_t'(3);
        ctrl.m2_ld  = 1'b1;
      end
      step_t'(9): begin  // t13, t14
        ctrl.a_oe  = 1'b1; ctrl.r1_ld = 1'b1;
        ctrl.m3_oe = 1'b1; ctrl.r2_ld = 1'b1;
      end
      step_t'(12): begin  // t13, t8
        ctrl.a_oe  = 1'b1; ctrl.r1_ld = 1'b1;
        ctrl.m2_oe = 1'b1; ctrl.r2_ld = 1'b1;
      end
      step_t'(15): begin  // t15
        ctrl.a_oe   = 1'b1; ctrl.ram_y_we = 1'b1;
        ctrl.x_take = 1'b1;
      end
      default: ;         // steps 4, 11, 14: no transfer
    endcase
  end

  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 step >= step_t'(1) && step <= step_t'(N_STEPS));

endmodule
