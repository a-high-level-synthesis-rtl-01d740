// tb_fir4_wrap: runs the FIR filter with the largest coefficients (all 255)
// and samples biased towards 255, so that the exact sum of the four products
// often exceeds 16 bits.  Every result must equal that sum modulo 2^16, one
// result every 15 clocks; the test counts how many results wrapped and fails
// if none did.
module tb_fir4_wrap;
  import fir_pkg::*;
  localparam int N_RES = 200;
  localparam logic [N_TAPS-1:0][DATA_W-1:0] KMAX = {4{8'hFF}};

  logic              clk = 1'b0, rst_n = 1'b0;
  logic [DATA_W-1:0] x_in;
  logic              x_take, y_valid;
  word_t             y_out;
  step_t             step;
  int checks = 0, failures = 0;

  fir4_fsmd #(.COEF(KMAX)) dut (.clk, .rst_n, .x_in, .x_take, .y_out, .y_valid, .step);

  always #10 clk = ~clk;

  initial begin
    repeat (16 * (N_RES + 10)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned hist [N_TAPS] = '{0, 0, 0, 0};
  int unsigned exact_q [$];
  int n_results = 0, n_wrapped = 0, cyc = 0, last_valid = -1;

  always @(negedge clk)
    x_in <= ($urandom_range(0, 3) == 0) ? DATA_W'($urandom) : 8'hFF;

  initial exact_q.push_back(0);

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (x_take) begin
      int unsigned acc;
      for (int i = N_TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = int'(x_in);
      acc = 0;
      for (int i = 0; i < N_TAPS; i++) acc += 255 * hist[i];
      exact_q.push_back(acc);
    end
  end

  always @(negedge clk) if (rst_n && y_valid) begin
    int unsigned e;
    if (last_valid >= 0) begin
      checks++;
      if (cyc - last_valid != N_STEPS) begin
        failures++; $display("results %0d clocks apart", cyc - last_valid);
      end
    end
    last_valid = cyc;
    e = exact_q.pop_front();
    if (e > 32'hFFFF) n_wrapped++;
    checks++;
    if (y_out != word_t'(e)) begin
      failures++; $display("result %0d: y=%0d expected %0d mod 2^16", n_results, y_out, e);
    end
    n_results++;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (n_results >= N_RES);
    $display("results: %0d, of which wrapped past 16 bits: %0d", n_results, n_wrapped);
    checks++;
    if (n_wrapped == 0) begin failures++; $display("no result wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
