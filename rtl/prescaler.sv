// Fixed divide-by-8 prescaler between the VCO and the programmable divider.
//
// A three-bit counter; its most significant bit is a square wave at one
// eighth of the input frequency. The division ratio follows the document;
// the counter form and the reset are this design's choices (the real part is
// a microwave divider).
//
// Interface: clk_in is the VCO signal, clk_out = clk_in / 8 with 50 % duty
// cycle, rising 8 input cycles apart. Asynchronous active-low reset.
module prescaler #(
  parameter int unsigned DIV_LOG2 = 3      // divide by 2**DIV_LOG2 = 8
)(
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);

  logic [DIV_LOG2-1:0] cnt;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign clk_out = cnt[DIV_LOG2-1];

endmodule
