// frame_fifo: first-in first-out buffer for the received hard bits.
//
// While the syndromes and the error magnitudes of a frame are being worked
// out, its hard bits wait here so they can be corrected on the way out. The
// decoder's FIFO is only named, not detailed, so this is a plain circular
// buffer of DEPTH words (one frame, n bits, by default) built as one memory
// array with a write and a read pointer. A read and a write may happen in
// the same clock even when the buffer is full, which is how the next frame is
// written while the previous one is read out.
//
// Timing: rd_data is registered and holds the word addressed by a read in
// the clock after rd_en. count is the number of stored words.
module frame_fifo #(
  parameter int unsigned DEPTH = 32400,
  parameter int unsigned WIDTH = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk)
    if (wr_en) mem[wr_ptr] <= wr_data;

  always_ff @(posedge clk)
    if (rd_en) rd_data <= mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en) wr_ptr <= next_ptr(wr_ptr);
      if (rd_en) rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(wr_en) - CW'(rd_en);
    end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en && !rd_en |-> count < CW'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> count != '0);

endmodule
