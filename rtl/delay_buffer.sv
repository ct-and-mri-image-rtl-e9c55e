// delay_buffer: the feedback delay of one SDF stage, a first-in first-out
// delay of exactly L enabled clock cycles.
//
// For L > 1 it is a circular memory of L words with one pointer: in each
// enabled cycle the word at the pointer is read (dout) and overwritten by
// din, and the pointer advances, so dout shows the word written L enabled
// cycles earlier. This maps onto a RAM with asynchronous read, which is this
// implementation's choice; the document only asks for a delay buffer of the
// given length. For L = 1 it is a single register. With en low nothing moves.
// The pointer is reset; the memory is not (the words read before the first
// L writes are meaningless, and the pipeline control marks them invalid).
module delay_buffer #(
  parameter int unsigned L = 4,    // delay in enabled cycles, a power of two
  parameter int unsigned W = 32    // word width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (L == 1) begin : g_reg
    logic [W-1:0] q;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)  q <= '0;
      else if (en) q <= din;
    assign dout = q;
  end else begin : g_ram
    localparam int unsigned AW = $clog2(L);
    logic [W-1:0]  mem [L];
    logic [AW-1:0] ptr;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)  ptr <= '0;
      else if (en) ptr <= ptr + 1'b1;

    always_ff @(posedge clk)
      if (en) mem[ptr] <= din;

    assign dout = mem[ptr];
  end

  initial assert (L >= 1 && (L & (L - 1)) == 0)
    else $error("delay_buffer: L must be a power of two");
endmodule
