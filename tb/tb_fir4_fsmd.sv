// tb_fir4_fsmd: end-to-end test of the bus-based 4-point FIR filter at its
// default parameters (coefficients k0..k3 = 0, 1, 2, 3).
//
// The testbench offers a sample whenever the filter raises x_take and keeps a
// reference delay line of the samples taken.  Every y_valid pulse must bring
// k0 x(n) + k1 x(n-1) + k2 x(n-2) + k3 x(n-3) (mod 2^16) of the period just
// computed.  It first feeds 3, 2, 1, 0 and then 1, for which the results are
// 14 and 8, then N_RAND random samples.  It also checks the rate: one sample
// taken and one result delivered every 15 clocks, y_out stable in between.
// Finally it counts how often each mechanism of the data path was used - each
// of the eight bus drivers, each load, the second use of multiplier m2 within
// a period, and the reuse of the adder and registers for three additions -
// and counts a failure for any that never happened.
module tb_fir4_fsmd;
  import fir_pkg::*;
  localparam int N_RAND = 300;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic [DATA_W-1:0] x_in;
  logic              x_take, y_valid;
  word_t             y_out;
  step_t             step;
  int checks = 0, failures = 0;

  fir4_fsmd dut (.clk, .rst_n, .x_in, .x_take, .y_out, .y_valid, .step);

  always #10 clk = ~clk;   // 20 ns step

  initial begin
    repeat (16 * (N_RAND + 20)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  // ---------------- stimulus ----------------
  localparam int N_DIRECT = 5;
  int unsigned directed [N_DIRECT] = '{3, 2, 1, 0, 1};
  int n_taken = 0;

  always @(negedge clk) begin
    if (n_taken < N_DIRECT) x_in <= DATA_W'(directed[n_taken]);
    else                    x_in <= DATA_W'($urandom);
  end

  // ---------------- reference model ----------------
  int unsigned k [N_TAPS] = '{0, 1, 2, 3};
  int unsigned hist [N_TAPS] = '{0, 0, 0, 0};
  int unsigned exp_q [$];          // expected results, oldest first
  int unsigned prev_y;
  int n_results = 0, last_take = -1, last_valid = -1, cyc = 0;
  int n_fig14 = 0, n_fig8 = 0;

  function automatic int unsigned fir_ref();
    int unsigned acc = 0;
    for (int i = 0; i < N_TAPS; i++) acc += k[i] * hist[i];
    return acc & 32'hFFFF;
  endfunction

  initial exp_q.push_back(0);      // first period runs on the all-zero history

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (x_take) begin
      if (last_take >= 0) check(cyc - last_take == N_STEPS,
                                $sformatf("samples %0d clocks apart", cyc - last_take));
      last_take = cyc;
      for (int i = N_TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = int'(x_in);
      exp_q.push_back(fir_ref());
      n_taken++;
    end
  end

  // results are checked mid-step, away from the clock edge
  always @(negedge clk) if (rst_n) begin
    if (y_valid) begin
      int unsigned e;
      if (last_valid >= 0) check(cyc - last_valid == N_STEPS,
                                 $sformatf("results %0d clocks apart", cyc - last_valid));
      last_valid = cyc;
      check(exp_q.size() > 0, "result without a sample");
      e = (exp_q.size() > 0) ? exp_q.pop_front() : 0;
      check(y_out == word_t'(e), $sformatf("result %0d: y=%0d expected %0d", n_results, y_out, e));
      // the directed part: windows (0,1,2,3) and (1,0,1,2) give 14 and 8
      if (n_results == 4) begin check(y_out == 16'd14, "first directed result is not 14"); n_fig14++; end
      if (n_results == 5) begin check(y_out == 16'd8,  "second directed result is not 8"); n_fig8++; end
      n_results++;
      prev_y = int'(y_out);
    end else if (n_results > 0) begin
      check(y_out == word_t'(prev_y), "y_out changed between results");
    end
  end

  // ---------------- mechanism coverage ----------------
  int cnt_oe [8];
  int cnt_ld [8];
  int m2_in_period = 0, m2_twice = 0, adds_in_period = 0, three_adds = 0;
  int bus_idle_steps = 0;

  always @(posedge clk) if (rst_n) begin
    ctrl_t c;
    c = dut.ctrl;
    cnt_oe[0] += int'(c.rom_oe); cnt_oe[1] += int'(c.m1_oe); cnt_oe[2] += int'(c.r1_oe);
    cnt_oe[3] += int'(c.a_oe);   cnt_oe[4] += int'(c.ram_oe); cnt_oe[5] += int'(c.m2_oe);
    cnt_oe[6] += int'(c.m3_oe);  cnt_oe[7] += int'(c.r2_oe);
    cnt_ld[0] += int'(c.m1_ld); cnt_ld[1] += int'(c.m2_ld); cnt_ld[2] += int'(c.m3_ld);
    cnt_ld[3] += int'(c.a_ld);  cnt_ld[4] += int'(c.r1_ld); cnt_ld[5] += int'(c.r2_ld);
    cnt_ld[6] += int'(c.ram_y_we); cnt_ld[7] += int'(c.x_take);
    if (!(c.rom_oe | c.m1_oe | c.r1_oe | c.a_oe | c.ram_oe | c.m2_oe | c.m3_oe | c.r2_oe))
      bus_idle_steps++;
    m2_in_period   += int'(c.m2_ld);
    adds_in_period += int'(c.a_ld);
    if (step == step_t'(N_STEPS)) begin
      if (m2_in_period == 2)   m2_twice++;
      if (adds_in_period == 3) three_adds++;
      m2_in_period = 0; adds_in_period = 0;
    end
  end

  // ---------------- sequence ----------------
  initial begin
    static string oe_name [8] = '{"rom->b1", "m1->b1", "r1->b1", "a->b1", "ram->b2", "m2->b2", "m3->b2", "r2->b2"};
    static string ld_name [8] = '{"m1 load", "m2 load", "m3 load", "a load", "r1 load", "r2 load", "ram result write", "sample take"};
    x_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (n_results >= N_DIRECT + N_RAND);
    @(negedge clk);
    $display("results checked: %0d, samples taken: %0d", n_results, n_taken);
    for (int i = 0; i < 8; i++) begin
      $display("tristate %-8s enabled %0d times", oe_name[i], cnt_oe[i]);
      check(cnt_oe[i] > 0, {"driver never used: ", oe_name[i]});
    end
    for (int i = 0; i < 8; i++) begin
      $display("%-17s %0d times", ld_name[i], cnt_ld[i]);
      check(cnt_ld[i] > 0, {"never happened: ", ld_name[i]});
    end
    $display("periods with m2 shared by two products: %0d", m2_twice);
    $display("periods with three additions on one adder: %0d", three_adds);
    $display("steps with both buses idle: %0d", bus_idle_steps);
    $display("directed results 14 / 8 seen: %0d / %0d", n_fig14, n_fig8);
    check(m2_twice > 0, "m2 never served two products in a period");
    check(three_adds > 0, "adder never performed three additions in a period");
    check(n_fig14 == 1 && n_fig8 == 1, "directed results not reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
