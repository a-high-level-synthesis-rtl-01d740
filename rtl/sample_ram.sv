// sample_ram: read-write store of the input samples and of the result.
//
// The memory holds the last N_TAPS input samples x(n)..x(n-3) in a circular
// buffer, plus one result word Y(n).  Once per sample period the control
// unit raises x_take; at that clock edge the head pointer advances and x_in
// overwrites the oldest sample, so the previous x(n) becomes x(n-1) without
// moving any data (pointer arithmetic wraps modulo N_TAPS, which must be a
// power of two).  The bus read port is addressed by sample age: tap = i
// reads x(n-i) (asynchronously, zero-extended to the bus width) for the
// tristate buffer onto bus b2.  The result word is written from bus b1 when
// y_we is high (the last transfer of the schedule) and is always visible on
// y_q, which is the filter output.
//
// The document names the RAM and the transfers in and out of it, but not its
// organisation; the circular buffer, the separate sample write port and the
// result word are this design's own choices.  Reset clears every word, which
// gives the filter an all-zero history.
module sample_ram
  import fir_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              x_take,  // write x_in as the new x(n)
  input  logic [DATA_W-1:0] x_in,
  input  tap_t              tap,     // bus read address: sample age
  output word_t             rdata,   // x(n-tap), zero-extended
  input  logic              y_we,    // write the result word from the bus
  input  word_t             y_wdata,
  output word_t             y_q      // stored result Y(n)
);

  logic [DATA_W-1:0] mem [N_TAPS];
  tap_t              head;           // index of x(n)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_TAPS; i++) mem[i] <= '0;
      head <= '0;
    end else if (x_take) begin
      mem[tap_t'(head + tap_t'(1))] <= x_in;
      head <= head + tap_t'(1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     y_q <= '0;
    else if (y_we)  y_q <= y_wdata;
  end

  assign rdata = word_t'(mem[tap_t'(head - tap)]);

endmodule
