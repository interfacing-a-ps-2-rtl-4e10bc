// sync_fifo -- single-clock FIFO buffering received scan codes.
//
// Holds up to DEPTH words of WIDTH bits (8 x 256 by default, the size the
// design specifies, kept in a memory array that maps onto block RAM). The
// ports mirror the design's FIFO: DIN/WR_EN to write, RD_EN/DOUT to read,
// FULL/EMPTY status and SINIT, a synchronous clear. The insides are this
// design's: write and read pointers that wrap at DEPTH and an occupancy
// count from which FULL and EMPTY are decoded.
//
// Timing: a write is stored at the clock edge where wr_en is high. A read
// accepted at an edge puts the word on dout at that edge, so dout is valid
// in the cycle after rd_en was high, and holds until the next read. A write
// while full and a read while empty are ignored: the word is lost, or dout
// is unchanged. A read and a write in the same cycle both take effect.
// sinit empties the FIFO and clears dout.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 256
) (
  input  logic             clk,
  input  logic             sinit,
  input  logic [WIDTH-1:0] din,
  input  logic             wr_en,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [CW-1:0]    count;
  logic             wr_ok, rd_ok;

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);
  assign wr_ok = wr_en && !full;
  assign rd_ok = rd_en && !empty;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  // Memory array: write port and registered read port.
  always_ff @(posedge clk) begin
    if (wr_ok) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (sinit) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      dout   <= '0;
    end else begin
      if (wr_ok) wr_ptr <= next_ptr(wr_ptr);
      if (rd_ok) begin
        rd_ptr <= next_ptr(rd_ptr);
        dout   <= mem[rd_ptr];
      end
      unique case ({wr_ok, rd_ok})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (sinit)
    count <= CW'(DEPTH));

endmodule
