// en_counter: binary up-counter with synchronous clear and count enable.
//
// count advances by one on each CLK edge where en is high; clear (or rst)
// returns it to zero and wins over en. Width is a parameter. Used for the
// read and write address counters of the SRAM access sequence.
module en_counter #(
  parameter int unsigned W = 19
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         en,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst || clear) count <= '0;
    else if (en)      count <= count + 1'b1;
  end

endmodule
