// Acounter: address counter of the NAND flash controller.
// It counts the position of the byte being moved: the data-buffer address
// during a page transfer (0..2047), and the byte index while the main FSM
// sends address bytes, ECC bytes or collects Read ID bytes. The main FSM
// clears it at the start of each run of bytes and increments it after each
// byte. 'changed' is high in the cycle after the count moved; the buffer's
// synchronous read port then still shows the old address, so the main FSM
// waits that cycle before using buffer data.
// Interface: clr has priority over inc; both act on the rising clock edge.
// The counter feeding the buffer address follows the controller's block
// description; its width and the 'changed' flag are this design's choices.
module Acounter #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             inc,
  output logic [WIDTH-1:0] cnt,
  output logic             changed
);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      changed <= 1'b0;
    end else begin
      changed <= clr | inc;
      if (clr)      cnt <= '0;
      else if (inc) cnt <= cnt + 1'b1;
    end
  end

endmodule
