// tb_fu_add: self-checking test of the adder unit.  Loads random
// operands, then checks during the following steps that ready rises exactly
// LAT = 2 steps after the load and that the sum is correct and held
// until the next load.  Loads also follow each other at random distances.
module tb_fu_add;
  localparam int unsigned W   = 16;
  localparam int unsigned LAT = 2;
  logic clk = 1'b0, rst_n = 1'b0, ld, oe;
  logic [W-1:0] a, b;
  logic [W-1:0] y;
  logic ready;
  int checks = 0, failures = 0;

  fu_add #(.W(W), .LAT(LAT)) dut (
    .clk, .rst_n, .ld, .a_bus(a), .b_bus(b), .oe, .y, .ready
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ea, eb;
    int wait_steps;
    ld = 1'b0; oe = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      ea = W'($urandom); eb = W'($urandom);
      a = ea; b = eb; ld = 1'b1;
      @(negedge clk);
      ld = 1'b0; a = W'($urandom); b = W'($urandom);   // bus moves on
      wait_steps = LAT + int'($urandom_range(0, 3));
      // now in step s+1 after a load in step s
      for (int k = 1; k <= wait_steps; k++) begin
        oe = (k >= LAT);
        #1;
        checks++;
        if (ready !== (k >= LAT)) begin
          failures++;
          $display("ready=%b %0d steps after load", ready, k);
        end
        if (k >= LAT) begin
          checks++;
          if (y !== W'(ea + eb)) begin
            failures++;
            $display("sum %0d+%0d: got %0d", ea, eb, y);
          end
        end
        @(negedge clk);
        oe = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
