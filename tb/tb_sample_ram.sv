// tb_sample_ram: checks the sample/result memory against a reference shift
// register of the last four samples.  Random sample writes, random read
// ages and random result writes; every read must return x(n-tap) and the
// result word must hold the last value written.
module tb_sample_ram;
  import fir_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic x_take, y_we;
  logic [DATA_W-1:0] x_in;
  tap_t tap;
  word_t rdata, y_wdata, y_q;
  logic [DATA_W-1:0] hist [N_TAPS];   // hist[i] = x(n-i)
  word_t ref_y;
  int checks = 0, failures = 0;

  sample_ram dut (.clk, .rst_n, .x_take, .x_in, .tap, .rdata, .y_we, .y_wdata, .y_q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x_take = 1'b0; y_we = 1'b0; x_in = '0; tap = '0; y_wdata = '0;
    for (int i = 0; i < N_TAPS; i++) hist[i] = '0;
    ref_y = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      x_take  = ($urandom_range(0, 3) == 0);
      y_we    = ($urandom_range(0, 4) == 0);
      x_in    = DATA_W'($urandom);
      y_wdata = word_t'($urandom);
      tap     = tap_t'($urandom);
      #1;
      checks++;
      if (rdata !== word_t'(hist[tap])) begin
        failures++;
        $display("read x(n-%0d) = %h, expected %h", tap, rdata, hist[tap]);
      end
      checks++;
      if (y_q !== ref_y) begin
        failures++;
        $display("result word %h, expected %h", y_q, ref_y);
      end
      @(posedge clk);
      if (x_take) begin
        for (int i = N_TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = x_in;
      end
      if (y_we) ref_y = y_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
