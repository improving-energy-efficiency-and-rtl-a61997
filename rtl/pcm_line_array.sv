// pcm_line_array: one line-organised storage array of the cache.
//
// DEPTH rows of WIDTH bits. The row address is decoded (the wordline decoder)
// to select one row for a read or a write. Reads are synchronous: rd_data holds
// the row addressed in the cycle rd_en was high and keeps it until the next
// read. Writes are bit-masked: only bits with wr_mask set are changed, which is
// how a read-before-write PCM array writes just the cells that differ. A read
// and a write in the same cycle to the same row return the old contents. The
// same module holds the tag array, the data array, the narrow flags and the
// delta value array; storage cells are modelled as register bits and carry no
// reset (the controller clears what must start cleared).
module pcm_line_array #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 512
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic [WIDTH-1:0]         wr_mask
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int i = 0; i < WIDTH; i++) begin
        if (wr_mask[i]) mem[wr_addr][i] <= wr_data[i];
      end
    end
  end
endmodule
