// line_buffer: fixed-length delay line for the image row buffers.
//
// A sample written on an enabled cycle comes out LEN enabled cycles later.
// It is a circular buffer in a memory array with one pointer: each enabled
// cycle reads the oldest entry at the pointer and overwrites it with the
// new sample, so no data is shifted. The memory is not reset; its first LEN
// outputs after reset are whatever it holds. Read is combinational.
// The row buffers and their length come from the original window design;
// building them as a RAM with a pointer is this design's choice.
module line_buffer #(
  parameter int unsigned LEN = 253,   // delay in enabled cycles, >= 1
  parameter int unsigned DW  = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  localparam int unsigned AW = (LEN > 1) ? $clog2(LEN) : 1;

  logic [DW-1:0] mem [LEN];
  logic [AW-1:0] ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  ptr <= '0;
    else if (en) ptr <= (ptr == AW'(LEN - 1)) ? '0 : ptr + AW'(1);
  end

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  assign dout = mem[ptr];

endmodule
