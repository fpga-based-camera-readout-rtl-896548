// sync_fifo -- single-clock FIFO used for the broker's command and result queues.
//
// A circular buffer of DEPTH words with a read and a write pointer and an
// occupancy counter. A write with wr_en stores din at the write pointer unless
// the FIFO is full (the word is then dropped). A read with rd_en while not
// empty moves the head word to q on the next clock edge; q holds its value
// otherwise, so q is valid the cycle after rd_en. empty and full are
// registered-state flags that reflect all operations up to the last edge.
// A simultaneous read and write on a full FIFO is allowed: the read frees the
// slot the write uses.
//
// The bridge uses a 256 x 32 bit queue with this read timing (read data one
// clock after the read enable, no output register); the memory here is a
// plain array in place of the vendor block-RAM FIFO, and both clocks of that
// FIFO are the same clock in the bridge, so a single-clock FIFO suffices.
// rst_n clears the pointers and q (asynchronous assert).
module sync_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  input  logic             wr_en,
  input  logic             rd_en,
  output logic [WIDTH-1:0] q,
  output logic             empty,
  output logic             full
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;

  wire do_rd = rd_en && (count != '0);
  wire do_wr = wr_en && ((count != (AW+1)'(DEPTH)) || do_rd);

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      q      <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) begin
        q      <= mem[rd_ptr];
        rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      end
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
