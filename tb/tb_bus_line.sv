// tb_bus_line: self-checking test of the bus with its tristate drivers.
// Drives random source values with no driver, or exactly one driver, enabled
// and checks that the bus carries the enabled source (0 when none is on).
module tb_bus_line;
  localparam int unsigned N = 4;
  localparam int unsigned W = 16;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic [N-1:0]       en;
  logic [N-1:0][W-1:0] data;
  logic [W-1:0]       bus;
  int checks = 0, failures = 0;

  bus_line #(.N_DRV(N), .W(W)) dut (.clk, .rst_n, .drv_en(en), .drv_data(data), .bus);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    int sel;
    en = '0; data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) data[i] = W'($urandom);
      sel = int'($urandom_range(0, N));   // N means: no driver enabled
      en  = '0;
      if (sel < N) en[sel] = 1'b1;
      exp = (sel < N) ? data[sel] : '0;
      #1;
      checks++;
      if (bus !== exp) begin
        failures++;
        $display("mismatch: en=%b bus=%h expected %h", en, bus, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
