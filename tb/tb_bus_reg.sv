// tb_bus_reg: self-checking test of the intermediate register.  Random loads
// and values; q must follow a reference copy updated only when ld is high.
module tb_bus_reg;
  localparam int unsigned W = 16;
  logic clk = 1'b0, rst_n = 1'b0, ld;
  logic [W-1:0] d, q, ref_q;
  int checks = 0, failures = 0;

  bus_reg #(.W(W)) dut (.clk, .rst_n, .ld, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = 1'b0; d = '0; ref_q = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("not cleared by reset: %h", q); end
    rst_n = 1'b1;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      ld = ($urandom_range(0, 2) == 0);
      d  = W'($urandom);
      @(posedge clk);
      if (ld) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("mismatch at %0d: q=%h expected %h", it, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
