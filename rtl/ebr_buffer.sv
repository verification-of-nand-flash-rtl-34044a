// ebr_buffer: the controller's data buffer, a true dual-port RAM of
// DEPTH x WIDTH (2048 bytes, one NAND page without spare area).
// Port A belongs to the host (BF_sel, BF_we, BF_ad, BF_din, BF_dou); port B
// to the main FSM, which writes bytes read from the flash and reads bytes to
// be programmed. Both ports are synchronous: a read returns the addressed
// byte one clock after the address while the port is enabled; a write stores
// din at the clock edge and the port's dout shows the old contents
// (read-first). If both ports write one address in the same cycle, port B's
// byte is kept. The dual-port buffer is the controller's; the read latency,
// enable behaviour and collision rule are this design's choices.
module ebr_buffer #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A (host)
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_din,
  output logic [WIDTH-1:0] a_dout,
  // port B (controller)
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_din,
  output logic [WIDTH-1:0] b_dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_dout <= mem[a_addr];
      if (a_we && !(b_en && b_we && b_addr == a_addr)) mem[a_addr] <= a_din;
    end
    if (b_en) begin
      b_dout <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_din;
    end
  end

endmodule
