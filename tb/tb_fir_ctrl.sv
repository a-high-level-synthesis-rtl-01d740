// tb_fir_ctrl: checks the control unit by executing its control words on a
// behavioural model of the bus data path written here (ROM, sample memory,
// three multipliers, adder, two registers, two buses).  For 20 sample periods
// with random coefficients and samples it checks that
//   * the step counts 1..15 and wraps, one period per 15 clocks;
//   * no bus has two drivers in a step;
//   * no unit is read before its latency (4 steps multiply, 2 steps add) and
//     no multiplier is reloaded while its product is still unread;
//   * the result is written once per period, in step 15, and equals
//     k0 x(n) + k1 x(n-1) + k2 x(n-2) + k3 x(n-3) (mod 2^16);
//   * the next sample is taken once per period, in step 15.
module tb_fir_ctrl;
  import fir_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0;
  step_t step;
  ctrl_t c;
  int checks = 0, failures = 0;

  fir_ctrl dut (.clk, .rst_n, .step, .ctrl(c));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("step %0d: %s", step, what);
    end
  endtask

  initial begin
    int unsigned k [N_TAPS];
    int unsigned x [N_TAPS];          // x[i] = x(n-i) of the current period
    int unsigned ma [3], mb [3];      // multiplier operand latches
    int          mage [3];            // steps since load
    bit          munread [3];         // product loaded but not yet read
    int unsigned aa, ab, r1, r2;
    int          aage;
    int unsigned b1, b2, exp_y;
    int          n1, n2, y_writes, takes, prev_step;

    for (int i = 0; i < N_TAPS; i++) begin k[i] = $urandom_range(0, 255); x[i] = 0; end
    for (int u = 0; u < 3; u++) begin ma[u] = 0; mb[u] = 0; mage[u] = 99; munread[u] = 0; end
    aa = 0; ab = 0; aage = 99; r1 = 0; r2 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;                     // step 1 is now on the outputs
    prev_step = N_STEPS;

    for (int p = 0; p < 20; p++) begin
      y_writes = 0; takes = 0;
      exp_y = (k[0]*x[0] + k[1]*x[1] + k[2]*x[2] + k[3]*x[3]) & 32'hFFFF;
      for (int s = 1; s <= N_STEPS; s++) begin
        if (p != 0 || s != 1) @(negedge clk);
        check(int'(step) == s, $sformatf("step is %0d, expected %0d", step, s));
        check(int'(step) == (prev_step % N_STEPS) + 1, "step did not advance by one");
        prev_step = int'(step);
        // drivers of b1 and b2
        n1 = int'(c.rom_oe) + int'(c.m1_oe) + int'(c.r1_oe) + int'(c.a_oe);
        n2 = int'(c.ram_oe) + int'(c.m2_oe) + int'(c.m3_oe) + int'(c.r2_oe);
        check(n1 <= 1 && n2 <= 1, $sformatf("bus contention b1:%0d b2:%0d", n1, n2));
        b1 = 0; b2 = 0;
        if (c.rom_oe) b1 = k[c.rom_addr];
        if (c.m1_oe) begin
          check(mage[0] >= MUL_LAT, "m1 read early"); b1 = (ma[0]*mb[0]) & 32'hFFFF; munread[0] = 0;
        end
        if (c.r1_oe) b1 = r1;
        if (c.a_oe) begin
          check(aage >= ADD_LAT, "adder read early"); b1 = (aa + ab) & 32'hFFFF;
        end
        if (c.ram_oe) b2 = x[c.ram_tap];
        if (c.m2_oe) begin
          check(mage[1] >= MUL_LAT, "m2 read early"); b2 = (ma[1]*mb[1]) & 32'hFFFF; munread[1] = 0;
        end
        if (c.m3_oe) begin
          check(mage[2] >= MUL_LAT, "m3 read early"); b2 = (ma[2]*mb[2]) & 32'hFFFF; munread[2] = 0;
        end
        if (c.r2_oe) b2 = r2;
        // end-of-step loads
        for (int u = 0; u < 3; u++) if (mage[u] < 99) mage[u]++;
        if (aage < 99) aage++;
        if (c.m1_ld) begin check(!munread[0], "m1 reloaded before read"); ma[0] = b1 & 255; mb[0] = b2 & 255; mage[0] = 1; munread[0] = 1; end
        if (c.m2_ld) begin check(!munread[1], "m2 reloaded before read"); ma[1] = b1 & 255; mb[1] = b2 & 255; mage[1] = 1; munread[1] = 1; end
        if (c.m3_ld) begin check(!munread[2], "m3 reloaded before read"); ma[2] = b1 & 255; mb[2] = b2 & 255; mage[2] = 1; munread[2] = 1; end
        if (c.a_ld)  begin aa = b1; ab = b2; aage = 1; end
        if (c.r1_ld) r1 = b1;
        if (c.r2_ld) r2 = b2;
        if (c.ram_y_we) begin
          y_writes++;
          check(s == N_STEPS, "result written before the last step");
          check(b1 == exp_y, $sformatf("period %0d: result %0d, expected %0d", p, b1, exp_y));
        end
        if (c.x_take) begin
          takes++;
          check(s == N_STEPS, "sample taken before the last step");
        end
      end
      check(y_writes == 1, $sformatf("%0d result writes in period %0d", y_writes, p));
      check(takes == 1, $sformatf("%0d sample takes in period %0d", takes, p));
      // shift in the next sample as the memory does at the end of step 15
      for (int i = N_TAPS - 1; i > 0; i--) x[i] = x[i-1];
      x[0] = $urandom_range(0, 255);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
