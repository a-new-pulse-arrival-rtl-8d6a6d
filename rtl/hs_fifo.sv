// hs_fifo - High Speed FIFO (HSF) between event capture and PCI readout.
//
// A single-clock FIFO of DEPTH entries of WIDTH bits, kept in a memory array
// with binary read and write pointers one bit wider than the address. It
// takes bursts of events at up to one per base clock and hands them to the
// slower readout. Read is show-ahead: while `empty` is low, `rd_data` is the
// oldest entry and `rd_en` removes it. A write while `full` is dropped and
// gives a one-cycle `overflow` pulse; a write and a read in the same cycle
// are both done when the FIFO is full, since the read frees the slot.
// `clr` empties it. `level` is the number of entries held.
//
// The FIFO and its purpose are from the original design; depth, show-ahead read
// and drop-on-full are this design's choices.
module hs_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic             overflow,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [AW:0]      level
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  always_comb begin
    level   = wptr - rptr;
    empty   = (level == '0);
    full    = (level == (AW+1)'(DEPTH));
    do_rd   = rd_en & ~empty;
    do_wr   = wr_en & (~full | do_rd);
    rd_data = mem[rptr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else if (clr) begin
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      overflow <= wr_en & ~do_wr;
    end
  end

  // A non-power-of-two depth would break the pointer arithmetic.
  initial assert (DEPTH == (1 << AW)) else $error("hs_fifo: DEPTH must be a power of two");
endmodule
