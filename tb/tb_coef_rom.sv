// tb_coef_rom: checks the coefficient ROM.  The default instance must read
// k0..k3 = 0, 1, 2, 3 (the coefficient set used by the filter's reference
// simulation); a second instance with other contents must return them at the
// right addresses, zero-extended to the bus width.
module tb_coef_rom;
  import fir_pkg::*;
  localparam logic [N_TAPS-1:0][DATA_W-1:0] K2 = {8'hA5, 8'h3C, 8'hFF, 8'h81};
  tap_t  addr;
  word_t q_def, q_alt;
  int checks = 0, failures = 0;

  coef_rom           u_def (.addr, .data(q_def));
  coef_rom #(.COEF(K2)) u_alt (.addr, .data(q_alt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp_alt [N_TAPS];
    exp_alt = '{16'h0081, 16'h00FF, 16'h003C, 16'h00A5};
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < N_TAPS; i++) begin
        addr = tap_t'(i);
        #1;
        checks += 2;
        if (q_def !== word_t'(i)) begin
          failures++; $display("default k%0d = %0d, expected %0d", i, q_def, i);
        end
        if (q_alt !== exp_alt[i]) begin
          failures++; $display("k%0d = %h, expected %h", i, q_alt, exp_alt[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
